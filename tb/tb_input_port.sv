// tb_input_port: self-checking test of an input port card (n = k = 4).
// Cells with random destinations arrive; each request the card makes is
// granted at random. Checks: in_ready is low exactly when the VOQ of the
// offered cell is full; every request names a VOQ that holds a cell not
// already requested; a granted request sends that VOQ's oldest cell in
// the very next cycle (one-slot grant-to-send latency) and no cell is sent
// otherwise; all cells leave in order.
module tb_input_port;
  localparam int unsigned N_PORT = 4;
  localparam int unsigned K = 4;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned DATA_W = 32;

  logic clk = 0;
  logic rst_n;
  logic in_valid;
  logic [1:0] in_j, in_h;
  logic [DATA_W-1:0] in_data;
  logic in_ready;
  logic req_valid;
  logic [1:0] req_j, req_h;
  logic granted;
  logic cell_valid;
  logic [DATA_W-1:0] cell_data;
  int checks = 0;
  int failures = 0;
  int blocked = 0;
  int sent = 0;
  int accepted = 0;

  logic [DATA_W-1:0] voq [K*N_PORT][$];
  int inflight [K*N_PORT];
  bit exp_cell;
  logic [DATA_W-1:0] exp_data;
  int seq = 0;
  int pend_q = -1;     // VOQ whose granted cell leaves this cycle

  // Cells physically held by VOQ q: a granted cell stays until it is sent.
  function automatic int held(int q);
    return voq[q].size() + ((exp_cell && pend_q == q) ? 1 : 0);
  endfunction

  input_port #(.N_PORT(N_PORT), .K(K), .DEPTH(DEPTH), .DATA_W(DATA_W),
               .I_IDX(0), .G_IDX(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst_n = 0; in_valid = 0; in_j = 0; in_h = 0; in_data = 0; granted = 0;
    for (int q = 0; q < K * N_PORT; q++) inflight[q] = 0;
    exp_cell = 0; exp_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int q;
      bit busy;
      busy = (t / 400) % 2 == 0;       // heavy arrivals, light grants
      in_valid = $urandom_range(99) < (busy ? 90 : 30);
      in_j = 2'($urandom_range(K - 1));
      in_h = 2'($urandom_range(N_PORT - 1));
      in_data = DATA_W'(seq);
      granted = req_valid && ($urandom_range(99) < (busy ? 20 : 70));
      #1;
      q = int'(in_j) * N_PORT + int'(in_h);
      checks++;
      if (in_ready !== (held(q) < DEPTH)) begin
        failures++;
        $display("FAIL t=%0d in_ready=%0b with %0d cells", t, in_ready, held(q));
      end
      if (in_valid && !in_ready) blocked++;
      if (req_valid) begin
        int rq;
        rq = int'(req_j) * N_PORT + int'(req_h);
        checks++;
        if (voq[rq].size() <= inflight[rq]) begin
          failures++;
          $display("FAIL t=%0d request for VOQ %0d holding %0d cells, %0d already granted",
                   t, rq, voq[rq].size(), inflight[rq]);
        end
      end
      checks++;
      if (cell_valid !== exp_cell || (exp_cell && cell_data !== exp_data)) begin
        failures++;
        $display("FAIL t=%0d cell %0b/%h want %0b/%h", t, cell_valid, cell_data, exp_cell, exp_data);
      end
      @(posedge clk);
      // model
      if (exp_cell) sent++;
      if (in_valid && held(q) < DEPTH) begin
        voq[q].push_back(in_data);
        accepted++;
        seq++;
      end
      exp_cell = 0;
      pend_q = -1;
      if (req_valid && granted) begin
        int rq;
        rq = int'(req_j) * N_PORT + int'(req_h);
        exp_cell = 1;
        exp_data = voq[rq].pop_front();
        pend_q = rq;
      end
      @(negedge clk);
    end
    checks++;
    if (blocked == 0 || sent == 0) begin
      failures++;
      $display("FAIL blocked=%0d sent=%0d", blocked, sent);
    end
    $display("accepted %0d, sent %0d, refused at full VOQ %0d", accepted, sent, blocked);
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
