// tb_central_module: self-checking test of central module CM(2) with
// n = m = k = 4. The model keeps Pointer_i(r,j) of each outgoing link,
// started by the initialisation rule and stepped by one per slot, and
// picks the first competing incoming link from it. Checks the requests
// passed to the output modules, the grants returned to the incoming links,
// contention (several links asking for one LC), and that the granted
// cells cross the crossbar one slot later.
module tb_central_module;
  localparam int unsigned N_PORT = 4;
  localparam int unsigned K = 4;
  localparam int unsigned M = 4;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned R_IDX = 2;

  logic clk = 0;
  logic rst_n;
  logic [K-1:0] li_req_valid;
  logic [K-1:0][1:0] li_req_j;
  logic [K-1:0][1:0] li_req_h;
  logic [K-1:0] li_gnt;
  logic [K-1:0] lc_req_valid;
  logic [K-1:0][1:0] lc_req_h;
  logic [K-1:0] lc_gnt;
  logic [K-1:0] li_cell_valid;
  logic [K-1:0][DATA_W-1:0] li_cell_data;
  logic [K-1:0] lc_cell_valid;
  logic [K-1:0][DATA_W-1:0] lc_cell_data;
  int checks = 0;
  int failures = 0;
  int contended = 0;

  int ptr [K];
  int win [K];
  int prev_src [K];

  central_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W), .R_IDX(R_IDX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < K; j++) begin
      ptr[j] = -1;
      prev_src[j] = -1;
    end
    for (int i = 0; i < K; i++)
      for (int g = 0; g < N_PORT; g++) begin
        int j, r;
        j = (g + i) % K;
        r = ((j - i) % int'(M) + int'(M)) % int'(M);
        if (r == R_IDX) ptr[j] = i;
      end
    for (int j = 0; j < K; j++)
      if (ptr[j] < 0) ptr[j] = ((j - int'(R_IDX)) % int'(K) + int'(K)) % int'(K);

    rst_n = 0; li_req_valid = 0; li_req_j = 0; li_req_h = 0; lc_gnt = 0;
    li_cell_valid = 0; li_cell_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [K-1:0] exp_li_gnt;
      li_req_valid = K'($urandom);
      li_req_j = 8'($urandom);
      li_req_h = 8'($urandom);
      li_cell_valid = K'($urandom);
      for (int i = 0; i < K; i++) li_cell_data[i] = DATA_W'($urandom);
      // reference arbitration
      for (int j = 0; j < K; j++) begin
        int n_req;
        win[j] = -1;
        n_req = 0;
        for (int s = 0; s < K; s++) begin
          int i;
          i = (ptr[j] + s) % K;
          if (li_req_valid[i] && int'(li_req_j[i]) == j) begin
            n_req++;
            if (win[j] < 0) win[j] = i;
          end
        end
        if (n_req > 1) contended++;
      end
      lc_gnt = '0;
      for (int j = 0; j < K; j++)
        if (win[j] >= 0 && $urandom_range(99) < 60) lc_gnt[j] = 1'b1;
      #1;
      exp_li_gnt = '0;
      for (int j = 0; j < K; j++) begin
        checks++;
        if (lc_req_valid[j] !== (win[j] >= 0) ||
            (win[j] >= 0 && lc_req_h[j] !== li_req_h[win[j]])) begin
          failures++;
          $display("FAIL t=%0d LC %0d: valid %0b h %0d, want winner %0d", t, j, lc_req_valid[j],
                   lc_req_h[j], win[j]);
        end
        if (win[j] >= 0 && lc_gnt[j]) exp_li_gnt[win[j]] = 1'b1;
        checks++;
        if (prev_src[j] >= 0) begin
          if (lc_cell_valid[j] !== li_cell_valid[prev_src[j]] ||
              lc_cell_data[j] !== li_cell_data[prev_src[j]]) begin
            failures++;
            $display("FAIL t=%0d LC %0d cell from LI %0d wrong", t, j, prev_src[j]);
          end
        end else if (lc_cell_valid[j] !== 1'b0) begin
          failures++;
          $display("FAIL t=%0d LC %0d carries a cell without a grant", t, j);
        end
      end
      checks++;
      if (li_gnt !== exp_li_gnt) begin
        failures++;
        $display("FAIL t=%0d li_gnt %b want %b", t, li_gnt, exp_li_gnt);
      end
      @(posedge clk);
      for (int j = 0; j < K; j++) begin
        prev_src[j] = (win[j] >= 0 && lc_gnt[j]) ? win[j] : -1;
        ptr[j] = (ptr[j] + 1) % K;
      end
      @(negedge clk);
    end
    checks++;
    if (contended == 0) failures++;
    $display("slots with contention at an LC: %0d", contended);
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
