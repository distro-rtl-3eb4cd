// voq_buffer: the virtual output queues of one input port card.
//
// An input port card keeps one FIFO per output port of the switch
// (NQ = N = n*k queues), so a cell waiting for a busy output never blocks
// cells for other outputs. Each queue takes at most one cell per timeslot
// and gives at most one. All queues share one memory array of NQ*DEPTH
// cells; queue q owns rows q*DEPTH .. q*DEPTH+DEPTH-1 and keeps its own
// head pointer and cell count.
//
// Interface: enq_* writes a cell to queue enq_q at the clock edge when
// enq_valid is high and the queue is not full (full[] is a per-queue
// status, so a caller checks full[enq_q] first; a write to a full queue is
// ignored). deq_valid/deq_q remove the head cell of a queue at the clock
// edge; deq_data shows that head cell combinationally in the same cycle.
// count[] gives each queue's occupancy. Reset (synchronous, active low)
// empties every queue.
//
// The Distro design fixes the number of queues and their one-in/one-out rate;
// the depth, the payload width and the shared-array organisation are this
// design's own choices.
module voq_buffer #(
  parameter int unsigned NQ     = distro_pkg::N_DEF * distro_pkg::K_DEF,
  parameter int unsigned DEPTH  = distro_pkg::DEPTH_DEF,
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1,
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enq_valid,
  input  logic [QW-1:0]        enq_q,
  input  logic [DATA_W-1:0]    enq_data,
  input  logic                 deq_valid,
  input  logic [QW-1:0]        deq_q,
  output logic [DATA_W-1:0]    deq_data,
  output logic [NQ-1:0]        full,
  output logic [NQ-1:0][CW-1:0] count
);

  logic [DATA_W-1:0] mem [NQ*DEPTH];
  logic [NQ-1:0][PW-1:0] head;
  logic [NQ-1:0][CW-1:0] cnt;

  logic        do_enq;
  logic        do_deq;
  logic [PW:0] wr_off;   // head + count, before wrap
  logic [PW-1:0] wr_slot;

  function automatic logic [PW-1:0] wrap_inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    for (int unsigned q = 0; q < NQ; q++)
      full[q] = (32'(cnt[q]) == DEPTH);
  end

  assign count    = cnt;
  assign do_enq   = enq_valid && !full[enq_q];
  assign do_deq   = deq_valid && (cnt[deq_q] != '0);
  assign wr_off   = (PW + 1)'(head[enq_q]) + (PW + 1)'(cnt[enq_q]);
  assign wr_slot  = (32'(wr_off) >= DEPTH) ? PW'(32'(wr_off) - DEPTH) : PW'(wr_off);
  assign deq_data = mem[32'(deq_q) * DEPTH + 32'(head[deq_q])];

  always_ff @(posedge clk) begin
    if (do_enq) mem[32'(enq_q) * DEPTH + 32'(wr_slot)] <= enq_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      cnt  <= '0;
    end else begin
      if (do_deq) head[deq_q] <= wrap_inc(head[deq_q]);
      for (int unsigned q = 0; q < NQ; q++) begin
        if ((do_enq && 32'(enq_q) == q) && !(do_deq && 32'(deq_q) == q))
          cnt[q] <= cnt[q] + 1'b1;
        else if (!(do_enq && 32'(enq_q) == q) && (do_deq && 32'(deq_q) == q))
          cnt[q] <= cnt[q] - 1'b1;
      end
    end
  end

  // A dequeue is only ever issued for a cell that is known to be there.
  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                   deq_valid |-> cnt[deq_q] != '0);

endmodule
