// tb_ip_scheduler: self-checking test of the Phase 1 scheduler of one
// input port, IP(1,2) of a switch with n = k = 4.
// A reference model keeps its own pointers (Pointer_j starting at
// (g+i) % k and stepping every slot, Pointer_h starting at i and stepping
// every k slots) and its own count of requestable cells per VOQ, and
// predicts the request register every cycle. Cells arrive at random; the
// request is granted at random, and a refused request must make its cell
// requestable again.
module tb_ip_scheduler;
  localparam int unsigned N_PORT = 4;
  localparam int unsigned K = 4;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned I_IDX = 1;
  localparam int unsigned G_IDX = 2;

  logic clk = 0;
  logic rst_n;
  logic arr_valid;
  logic [1:0] arr_j, arr_h;
  logic granted;
  logic req_valid;
  logic [1:0] req_j, req_h;
  int checks = 0;
  int failures = 0;
  int refused = 0;
  int ptr_h_steps = 0;

  int elig [K][N_PORT];
  int stored [K][N_PORT];
  int mptr_j;
  int mptr_h [K];
  int slot;
  bit exp_valid;
  int exp_j, exp_h;

  ip_scheduler #(.N_PORT(N_PORT), .K(K), .DEPTH(DEPTH), .I_IDX(I_IDX), .G_IDX(G_IDX)) dut (.*);

  always #5 clk = ~clk;

  // Reference Phase 1: first non-empty group from Pointer_j, then first
  // non-empty VOQ of that group from its Pointer_h.
  task automatic predict();
    exp_valid = 0; exp_j = 0; exp_h = 0;
    for (int s = 0; s < K && !exp_valid; s++) begin
      int j;
      j = (mptr_j + s) % K;
      for (int u = 0; u < N_PORT; u++) begin
        int h;
        h = (mptr_h[j] + u) % N_PORT;
        if (elig[j][h] > 0) begin
          exp_valid = 1; exp_j = j; exp_h = h;
          break;
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; arr_valid = 0; arr_j = 0; arr_h = 0; granted = 0;
    for (int j = 0; j < K; j++)
      for (int h = 0; h < N_PORT; h++) begin
        elig[j][h] = 0; stored[j][h] = 0;
      end
    mptr_j = (G_IDX + I_IDX) % K;
    for (int j = 0; j < K; j++) mptr_h[j] = I_IDX % N_PORT;
    slot = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int aj, ah;
      aj = $urandom_range(K - 1);
      ah = $urandom_range(N_PORT - 1);
      arr_valid = (stored[aj][ah] < DEPTH) && ($urandom_range(99) < ((t / 500) % 2 ? 25 : 70));
      arr_j = 2'(aj); arr_h = 2'(ah);
      granted = req_valid && ($urandom_range(99) < 60);
      predict();
      @(posedge clk);
      // model update
      if (req_valid) begin
        if (granted) stored[req_j][req_h]--;
        else begin
          elig[req_j][req_h]++;
          refused++;
        end
      end
      if (arr_valid) begin
        elig[aj][ah]++;
        stored[aj][ah]++;
      end
      if (exp_valid) elig[exp_j][exp_h]--;
      mptr_j = (mptr_j + 1) % K;
      if (slot == K - 1) begin
        for (int j = 0; j < K; j++) mptr_h[j] = (mptr_h[j] + 1) % N_PORT;
        ptr_h_steps++;
      end
      slot = (slot + 1) % K;
      @(negedge clk);
      checks++;
      if (req_valid !== exp_valid || (exp_valid && (int'(req_j) != exp_j || int'(req_h) != exp_h))) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d got %0b [%0d,%0d] want %0b [%0d,%0d]", t, req_valid, req_j, req_h,
                   exp_valid, exp_j, exp_h);
      end
    end
    checks++;
    if (refused == 0 || ptr_h_steps == 0) begin
      failures++;
      $display("FAIL refused=%0d ptr_h_steps=%0d", refused, ptr_h_steps);
    end
    $display("refused requests %0d, Pointer_h steps %0d", refused, ptr_h_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
