// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Drives every pointer with random and corner-case request patterns and
// compares the grant with a reference that walks from the pointer upward,
// wrapping round, to the first request.
module tb_rr_arbiter;
  localparam int unsigned N = 8;
  localparam int unsigned W = $clog2(N);

  logic [N-1:0] req;
  logic [W-1:0] ptr;
  logic         gnt_valid;
  logic [W-1:0] gnt_idx;
  logic [N-1:0] gnt;
  int checks = 0;
  int failures = 0;

  rr_arbiter #(.N(N)) dut (.req, .ptr, .gnt_valid, .gnt_idx, .gnt);

  task automatic check_one();
    int exp_idx;
    bit exp_valid;
    exp_valid = (req != '0);
    exp_idx = 0;
    for (int s = 0; s < N; s++)
      if (req[(int'(ptr) + s) % N]) begin
        exp_idx = (int'(ptr) + s) % N;
        break;
      end
    #1;
    checks++;
    if (gnt_valid !== exp_valid ||
        (exp_valid && (int'(gnt_idx) != exp_idx || gnt != (N'(1) << exp_idx))) ||
        (!exp_valid && gnt != '0)) begin
      failures++;
      $display("FAIL req=%b ptr=%0d: got v=%0b idx=%0d gnt=%b, want v=%0b idx=%0d",
               req, ptr, gnt_valid, gnt_idx, gnt, exp_valid, exp_idx);
    end
  endtask

  initial begin
    // every pattern of a single request, every pointer
    for (int p = 0; p < N; p++)
      for (int b = 0; b < N; b++) begin
        ptr = W'(p); req = N'(1) << b; check_one();
      end
    // no request, all requests
    for (int p = 0; p < N; p++) begin
      ptr = W'(p); req = '0; check_one();
      req = '1; check_one();
    end
    // random patterns
    for (int t = 0; t < 3000; t++) begin
      ptr = W'($urandom_range(N - 1));
      req = N'($urandom);
      check_one();
    end
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
