// input_port: input port card IP(i,g) of the bufferless Clos switch.
//
// All cells of the switch are stored here, in N = n*k virtual output
// queues (voq_buffer), since the three switching stages hold no buffers.
// The card's Phase 1 scheduler (ip_scheduler) picks one VOQ per timeslot
// and offers it, as the pair [j,h], to the input module. If the request
// is granted along the whole path IP -> LI -> LC -> OP, the head cell of
// that VOQ is sent into the switch in the next timeslot.
//
// Interface and timing (one clock = one timeslot):
//   in_valid/in_j/in_h/in_data: a cell arriving from the line for output
//     port OP(in_j,in_h). It is stored at the clock edge when in_ready is
//     high; in_ready is low while that VOQ is full (the published design assumes
//     buffers large enough never to overflow; this flow-control signal is
//     this design's own).
//   req_valid/req_j/req_h: the request register, offered during a cycle.
//   granted: comes back combinationally in that same cycle.
//   cell_valid/cell_data: the granted cell, sent in the following cycle.
// A cell written at edge t is requested from edge t+1 at the earliest,
// granted during cycle t+1 and leaves the card during cycle t+2.
module input_port #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,
  parameter int unsigned K      = distro_pkg::K_DEF,
  parameter int unsigned DEPTH  = distro_pkg::DEPTH_DEF,
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  parameter int unsigned I_IDX  = 0,
  parameter int unsigned G_IDX  = 0,
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [JW-1:0]     in_j,
  input  logic [HW-1:0]     in_h,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  output logic              req_valid,
  output logic [JW-1:0]     req_j,
  output logic [HW-1:0]     req_h,
  input  logic              granted,
  output logic              cell_valid,
  output logic [DATA_W-1:0] cell_data
);

  localparam int unsigned NQ = N_PORT * K;
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1;

  logic [NQ-1:0]         voq_full;
  logic [QW-1:0]         in_q;
  logic                  accept;
  logic                  gnt_q_valid;   // grant register
  logic [QW-1:0]         gnt_q;

  // VOQ(i,g,j,h) is queue number j*n + h.
  assign in_q     = QW'(32'(in_j) * N_PORT + 32'(in_h));
  assign in_ready = !voq_full[in_q];
  assign accept   = in_valid && in_ready;

  voq_buffer #(.NQ(NQ), .DEPTH(DEPTH), .DATA_W(DATA_W)) u_voqs (
    .clk, .rst_n,
    .enq_valid(accept), .enq_q(in_q), .enq_data(in_data),
    .deq_valid(gnt_q_valid), .deq_q(gnt_q), .deq_data(cell_data),
    .full(voq_full), .count()
  );

  ip_scheduler #(.N_PORT(N_PORT), .K(K), .DEPTH(DEPTH),
                 .I_IDX(I_IDX), .G_IDX(G_IDX)) u_sched (
    .clk, .rst_n,
    .arr_valid(accept), .arr_j(in_j), .arr_h(in_h),
    .granted(granted),
    .req_valid, .req_j, .req_h
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gnt_q_valid <= 1'b0;
      gnt_q       <= '0;
    end else begin
      gnt_q_valid <= req_valid && granted;
      gnt_q       <= QW'(32'(req_j) * N_PORT + 32'(req_h));
    end
  end

  assign cell_valid = gnt_q_valid;

endmodule
