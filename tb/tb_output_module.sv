// tb_output_module: self-checking test of output module OM(1) with
// n = m = k = 4. The model keeps Pointer_r(j,h) of each output port,
// started by the initialisation rule and stepped by one every k slots, and
// picks the first competing central-module link from it. Checks the grants
// returned to the links, contention (several links asking for one port),
// and that each granted cell appears on its output port two slots after
// the grant (one slot crossing, one output register).
module tb_output_module;
  localparam int unsigned N_PORT = 4;
  localparam int unsigned K = 4;
  localparam int unsigned M = 4;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned J_IDX = 1;

  logic clk = 0;
  logic rst_n;
  logic [M-1:0] lc_req_valid;
  logic [M-1:0][1:0] lc_req_h;
  logic [M-1:0] lc_gnt;
  logic [M-1:0] lc_cell_valid;
  logic [M-1:0][DATA_W-1:0] lc_cell_data;
  logic [N_PORT-1:0] out_valid;
  logic [N_PORT-1:0][DATA_W-1:0] out_data;
  int checks = 0;
  int failures = 0;
  int contended = 0;

  int ptr [N_PORT];
  int win [N_PORT];
  int prev_src [N_PORT];
  bit exp_v [N_PORT];
  logic [DATA_W-1:0] exp_d [N_PORT];

  output_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W), .J_IDX(J_IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int h = 0; h < N_PORT; h++) begin
      ptr[h] = ((int'(J_IDX) - h) % int'(M) + int'(M)) % int'(M);
      prev_src[h] = -1;
      exp_v[h] = 0;
      exp_d[h] = 0;
    end
    for (int i = 0; i < K; i++)
      for (int g = 0; g < N_PORT; g++) begin
        int j;
        j = (g + i) % K;
        if (j == J_IDX && i < N_PORT) ptr[i] = ((j - i) % int'(M) + int'(M)) % int'(M);
      end

    rst_n = 0; lc_req_valid = 0; lc_req_h = 0; lc_cell_valid = 0; lc_cell_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [M-1:0] exp_gnt;
      lc_req_valid = M'($urandom);
      lc_req_h = 8'($urandom);
      lc_cell_valid = M'($urandom);
      for (int r = 0; r < M; r++) lc_cell_data[r] = DATA_W'($urandom);
      #1;
      exp_gnt = '0;
      for (int h = 0; h < N_PORT; h++) begin
        int n_req;
        win[h] = -1;
        n_req = 0;
        for (int s = 0; s < M; s++) begin
          int r;
          r = (ptr[h] + s) % M;
          if (lc_req_valid[r] && int'(lc_req_h[r]) == h) begin
            n_req++;
            if (win[h] < 0) win[h] = r;
          end
        end
        if (n_req > 1) contended++;
        if (win[h] >= 0) exp_gnt[win[h]] = 1'b1;
        checks++;
        if (out_valid[h] !== exp_v[h] || (exp_v[h] && out_data[h] !== exp_d[h])) begin
          failures++;
          $display("FAIL t=%0d OP %0d out %0b/%h want %0b/%h", t, h, out_valid[h], out_data[h],
                   exp_v[h], exp_d[h]);
        end
      end
      checks++;
      if (lc_gnt !== exp_gnt) begin
        failures++;
        $display("FAIL t=%0d lc_gnt %b want %b", t, lc_gnt, exp_gnt);
      end
      @(posedge clk);
      for (int h = 0; h < N_PORT; h++) begin
        exp_v[h] = prev_src[h] >= 0 && lc_cell_valid[prev_src[h]];
        exp_d[h] = exp_v[h] ? lc_cell_data[prev_src[h]] : '0;
        prev_src[h] = win[h];
        if (t % K == K - 1) ptr[h] = (ptr[h] + 1) % M;
      end
      @(negedge clk);
    end
    checks++;
    if (contended == 0) failures++;
    $display("slots with contention at an OP: %0d", contended);
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
