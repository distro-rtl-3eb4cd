// tb_input_module: self-checking test of input module IM(1) with n = 4
// input ports, k = 4 and m = 6 central modules (so two links serve no
// port in each slot). The model gives link LI(i,r) the port the
// initialisation rule assigns (j = (g+i)%k, r = (j-i) mod m), the spare
// values 4 and 5 to the two other links, and steps every pointer by one
// modulo m per slot. Checks the forwarded requests, the grants returned to
// the ports, and that granted cells cross the crossbar one slot later.
module tb_input_module;
  localparam int unsigned N_PORT = 4;
  localparam int unsigned K = 4;
  localparam int unsigned M = 6;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned I_IDX = 1;

  logic clk = 0;
  logic rst_n;
  logic [N_PORT-1:0] ip_req_valid;
  logic [N_PORT-1:0][1:0] ip_req_j;
  logic [N_PORT-1:0][1:0] ip_req_h;
  logic [N_PORT-1:0] ip_gnt;
  logic [M-1:0] li_req_valid;
  logic [M-1:0][1:0] li_req_j;
  logic [M-1:0][1:0] li_req_h;
  logic [M-1:0] li_gnt;
  logic [N_PORT-1:0] ip_cell_valid;
  logic [N_PORT-1:0][DATA_W-1:0] ip_cell_data;
  logic [M-1:0] li_cell_valid;
  logic [M-1:0][DATA_W-1:0] li_cell_data;
  int checks = 0;
  int failures = 0;
  int grants = 0;

  int ptr [M];
  int prev_src [M];      // port connected to each link this slot, -1 if none

  input_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W), .I_IDX(I_IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int spare;
    for (int r = 0; r < M; r++) ptr[r] = -1;
    for (int g = 0; g < N_PORT; g++) begin
      int j, r;
      j = (g + I_IDX) % K;
      r = ((j - int'(I_IDX)) % int'(M) + int'(M)) % int'(M);
      ptr[r] = g;
    end
    spare = N_PORT;
    for (int r = 0; r < M; r++)
      if (ptr[r] < 0) ptr[r] = spare++;
    for (int r = 0; r < M; r++) prev_src[r] = -1;

    rst_n = 0; ip_req_valid = 0; ip_req_j = 0; ip_req_h = 0; li_gnt = 0;
    ip_cell_valid = 0; ip_cell_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [N_PORT-1:0] exp_ip_gnt;
      ip_req_valid = N_PORT'($urandom);
      ip_req_j = 8'($urandom);
      ip_req_h = 8'($urandom);
      ip_cell_valid = N_PORT'($urandom);
      for (int g = 0; g < N_PORT; g++) ip_cell_data[g] = DATA_W'($urandom);
      // grant at random, but only links the model expects to carry a request
      li_gnt = '0;
      for (int r = 0; r < M; r++)
        if (ptr[r] < N_PORT && ip_req_valid[ptr[r]] && ($urandom_range(99) < 60)) li_gnt[r] = 1'b1;
      #1;
      exp_ip_gnt = '0;
      for (int r = 0; r < M; r++) begin
        bit ev;
        ev = ptr[r] < N_PORT && ip_req_valid[ptr[r]];
        checks++;
        if (li_req_valid[r] !== ev ||
            (ev && (li_req_j[r] !== ip_req_j[ptr[r]] || li_req_h[r] !== ip_req_h[ptr[r]]))) begin
          failures++;
          $display("FAIL t=%0d LI %0d request %0b, expected port %0d", t, r, li_req_valid[r], ptr[r]);
        end
        if (ev && li_gnt[r]) exp_ip_gnt[ptr[r]] = 1'b1;
        // cells of the slot granted before
        checks++;
        if (prev_src[r] >= 0) begin
          if (li_cell_valid[r] !== ip_cell_valid[prev_src[r]] ||
              li_cell_data[r] !== ip_cell_data[prev_src[r]]) begin
            failures++;
            $display("FAIL t=%0d LI %0d cell from port %0d wrong", t, r, prev_src[r]);
          end
        end else if (li_cell_valid[r] !== 1'b0) begin
          failures++;
          $display("FAIL t=%0d LI %0d carries a cell without a grant", t, r);
        end
      end
      checks++;
      if (ip_gnt !== exp_ip_gnt) begin
        failures++;
        $display("FAIL t=%0d ip_gnt %b want %b", t, ip_gnt, exp_ip_gnt);
      end
      grants += $countones(exp_ip_gnt);
      @(posedge clk);
      for (int r = 0; r < M; r++) begin
        prev_src[r] = (ptr[r] < N_PORT && ip_req_valid[ptr[r]] && li_gnt[r]) ? ptr[r] : -1;
        ptr[r] = (ptr[r] + 1) % M;
      end
      @(negedge clk);
    end
    checks++;
    if (grants == 0) failures++;
    $display("grants %0d", grants);
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
