// output_module: output module OM(j), an m x n crossbar with the Phase 4
// arbiters of its n output ports OP(j,h).
//
// Phase 4 of Distro: output port OP(j,h) collects the requests [h] that
// the m incoming links LC(r,j) carry for it. If there are any, its
// round-robin Arbiter_r(j,h) picks one, starting from Pointer_r(j,h), and
// grants it; the grant travels back through LC, LI and IM to the input
// port, whose VOQ sends its head cell in the next timeslot. Pointer_r
// starts at the value given in distro_pkg and advances by one every k
// timeslots (a local slot counter modulo k marks the k-th slot).
//
// The output ports hold no buffer: the cell that crosses the OM crossbar
// is only registered once, in the output line register out_valid/out_data.
//
// Timing (one clock = one timeslot): requests and grants are combinational
// within a cycle; a granted port stores its crossbar setting at the clock
// edge; the cell crosses during the next cycle and appears on out_* the
// cycle after that.
module output_module #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,
  parameter int unsigned K      = distro_pkg::K_DEF,
  parameter int unsigned M      = distro_pkg::M_DEF,
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  parameter int unsigned J_IDX  = 0,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // requests on the m incoming links LC(r,j), grants back
  input  logic [M-1:0]                  lc_req_valid,
  input  logic [M-1:0][HW-1:0]          lc_req_h,
  output logic [M-1:0]                  lc_gnt,
  // cells
  input  logic [M-1:0]                  lc_cell_valid,
  input  logic [M-1:0][DATA_W-1:0]      lc_cell_data,
  output logic [N_PORT-1:0]             out_valid,
  output logic [N_PORT-1:0][DATA_W-1:0] out_data
);
  import distro_pkg::*;

  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [N_PORT-1:0][RW-1:0]   ptr_r;
  logic [KW-1:0]               slot_cnt;
  logic [N_PORT-1:0][M-1:0]    arb_req;    // [h][r]
  logic [N_PORT-1:0]           arb_valid;
  logic [N_PORT-1:0][RW-1:0]   arb_idx;
  logic [N_PORT-1:0][M-1:0]    arb_gnt;
  logic [N_PORT-1:0]           cfg_valid;
  logic [N_PORT-1:0][RW-1:0]   cfg_sel;
  logic [N_PORT-1:0]           xb_valid;
  logic [N_PORT-1:0][DATA_W-1:0] xb_data;

  always_comb begin
    for (int unsigned h = 0; h < N_PORT; h++)
      for (int unsigned r = 0; r < M; r++)
        arb_req[h][r] = lc_req_valid[r] && 32'(lc_req_h[r]) == h;
  end

  for (genvar gh = 0; gh < N_PORT; gh++) begin : g_op
    rr_arbiter #(.N(M)) u_arbiter_r (
      .req(arb_req[gh]), .ptr(ptr_r[gh]),
      .gnt_valid(arb_valid[gh]), .gnt_idx(arb_idx[gh]), .gnt(arb_gnt[gh])
    );
  end

  always_comb begin
    lc_gnt = '0;
    for (int unsigned h = 0; h < N_PORT; h++)
      lc_gnt = lc_gnt | arb_gnt[h];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned h = 0; h < N_PORT; h++)
        ptr_r[h] <= RW'(init_ptr_r(J_IDX, h, N_PORT, K, M));
      slot_cnt  <= '0;
      cfg_valid <= '0;
      cfg_sel   <= '0;
      out_valid <= '0;
      out_data  <= '0;
    end else begin
      slot_cnt <= (32'(slot_cnt) == K - 1) ? '0 : slot_cnt + 1'b1;
      for (int unsigned h = 0; h < N_PORT; h++) begin
        if (32'(slot_cnt) == K - 1)
          ptr_r[h] <= (32'(ptr_r[h]) == M - 1) ? '0 : ptr_r[h] + 1'b1;
        cfg_valid[h] <= arb_valid[h];
        cfg_sel[h]   <= arb_idx[h];
      end
      out_valid <= xb_valid;
      out_data  <= xb_data;
    end
  end

  crossbar #(.NI(M), .NO(N_PORT), .W(DATA_W)) u_xbar (
    .in_valid(lc_cell_valid), .in_data(lc_cell_data),
    .sel_valid(cfg_valid), .sel(cfg_sel),
    .out_valid(xb_valid), .out_data(xb_data)
  );

  // Each incoming link is granted to at most one output port.
  a_one_gnt_per_link: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(lc_gnt) == $countones(arb_valid));

endmodule
