// tb_voq_buffer: self-checking test of the virtual output queues.
// Random writes and reads on a small buffer are mirrored in one
// SystemVerilog queue per VOQ; head cell, occupancy and full flag are
// compared every cycle, including writes to a full queue, which must be
// ignored, and a write and a read of the same queue in one cycle.
module tb_voq_buffer;
  localparam int unsigned NQ = 4;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned QW = $clog2(NQ);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 0;
  logic rst_n;
  logic enq_valid;
  logic [QW-1:0] enq_q;
  logic [DATA_W-1:0] enq_data;
  logic deq_valid;
  logic [QW-1:0] deq_q;
  logic [DATA_W-1:0] deq_data;
  logic [NQ-1:0] full;
  logic [NQ-1:0][CW-1:0] count;
  int checks = 0;
  int failures = 0;
  int full_writes = 0;
  logic [DATA_W-1:0] model [NQ][$];

  voq_buffer #(.NQ(NQ), .DEPTH(DEPTH), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst_n = 0; enq_valid = 0; deq_valid = 0; enq_q = 0; deq_q = 0; enq_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // drive on the falling edge
      @(negedge clk);
      // check the state
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (int'(count[q]) != model[q].size() || full[q] != (model[q].size() == DEPTH)) begin
          failures++;
          $display("FAIL t=%0d q=%0d count=%0d full=%0b model=%0d", t, q, count[q], full[q], model[q].size());
        end
      end
      // writes favour filling in the first half, draining in the second
      enq_valid = ($urandom_range(99) < ((t % 400) < 200 ? 80 : 30));
      enq_q     = QW'($urandom_range(NQ - 1));
      enq_data  = DATA_W'($urandom);
      deq_q     = QW'($urandom_range(NQ - 1));
      deq_valid = (model[deq_q].size() > 0) && ($urandom_range(99) < ((t % 400) < 200 ? 30 : 80));
      #1;
      if (deq_valid) begin
        checks++;
        if (deq_data !== model[deq_q][0]) begin
          failures++;
          $display("FAIL t=%0d read q=%0d got %h want %h", t, deq_q, deq_data, model[deq_q][0]);
        end
      end
      @(posedge clk);
      // a full queue refuses the write even if it is read in the same cycle
      if (enq_valid && model[enq_q].size() == DEPTH) begin
        full_writes++;
        if (deq_valid) void'(model[deq_q].pop_front());
      end else begin
        if (deq_valid) void'(model[deq_q].pop_front());
        if (enq_valid) model[enq_q].push_back(enq_data);
      end
    end
    checks++;
    if (full_writes == 0) begin
      failures++;
      $display("FAIL no write to a full queue was exercised");
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
