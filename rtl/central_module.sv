// central_module: central module CM(r), a k x k crossbar with the Phase 3
// arbiters of its k outgoing links LC(r,j).
//
// Phase 3 of Distro: link LC(r,j) collects the requests [j,h] that the k
// incoming links LI(i,r) carry for output module j. If there are any, its
// round-robin Arbiter_i(r,j) picks one, starting from Pointer_i(r,j), and
// the link passes [h] on to output port OP(j,h). The grant that comes back
// from OM(j) is returned to the chosen LI(i,r).
//
// Pointer_i(r,j) starts at the value given in distro_pkg and advances by
// one every timeslot. The published algorithm lists the update of the other four
// pointer kinds but not of this one; advancing every slot follows its
// earlier static round-robin dispatching scheme, where the central-module
// pointer moves every slot, and is this design's reading.
//
// Timing (one clock = one timeslot): requests forward and grants back are
// combinational within a cycle; a granted link stores its crossbar setting
// at the clock edge and the cell crosses during the next cycle.
module central_module #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,
  parameter int unsigned K      = distro_pkg::K_DEF,
  parameter int unsigned M      = distro_pkg::M_DEF,
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  parameter int unsigned R_IDX  = 0,
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // requests on the k incoming links LI(i,r), grants back
  input  logic [K-1:0]              li_req_valid,
  input  logic [K-1:0][JW-1:0]      li_req_j,
  input  logic [K-1:0][HW-1:0]      li_req_h,
  output logic [K-1:0]              li_gnt,
  // requests on the k outgoing links LC(r,j), grants from the OMs
  output logic [K-1:0]              lc_req_valid,
  output logic [K-1:0][HW-1:0]      lc_req_h,
  input  logic [K-1:0]              lc_gnt,
  // cells
  input  logic [K-1:0]              li_cell_valid,
  input  logic [K-1:0][DATA_W-1:0]  li_cell_data,
  output logic [K-1:0]              lc_cell_valid,
  output logic [K-1:0][DATA_W-1:0]  lc_cell_data
);
  import distro_pkg::*;

  logic [K-1:0][JW-1:0] ptr_i;
  logic [K-1:0][K-1:0]  arb_req;     // [j][i]
  logic [K-1:0]         arb_valid;
  logic [K-1:0][JW-1:0] arb_idx;
  logic [K-1:0][K-1:0]  arb_gnt;
  logic [K-1:0]         cfg_valid;
  logic [K-1:0][JW-1:0] cfg_sel;

  always_comb begin
    for (int unsigned j = 0; j < K; j++)
      for (int unsigned i = 0; i < K; i++)
        arb_req[j][i] = li_req_valid[i] && 32'(li_req_j[i]) == j;
  end

  for (genvar gj = 0; gj < K; gj++) begin : g_lc
    rr_arbiter #(.N(K)) u_arbiter_i (
      .req(arb_req[gj]), .ptr(ptr_i[gj]),
      .gnt_valid(arb_valid[gj]), .gnt_idx(arb_idx[gj]), .gnt(arb_gnt[gj])
    );
    assign lc_req_valid[gj] = arb_valid[gj];
    assign lc_req_h[gj]     = li_req_h[arb_idx[gj]];
  end

  always_comb begin
    li_gnt = '0;
    for (int unsigned j = 0; j < K; j++)
      if (lc_gnt[j]) li_gnt = li_gnt | arb_gnt[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < K; j++)
        ptr_i[j] <= JW'(init_ptr_i(R_IDX, j, N_PORT, K, M));
      cfg_valid <= '0;
      cfg_sel   <= '0;
    end else begin
      for (int unsigned j = 0; j < K; j++) begin
        ptr_i[j]     <= (32'(ptr_i[j]) == K - 1) ? '0 : ptr_i[j] + 1'b1;
        cfg_valid[j] <= arb_valid[j] && lc_gnt[j];
        cfg_sel[j]   <= arb_idx[j];
      end
    end
  end

  crossbar #(.NI(K), .NO(K), .W(DATA_W)) u_xbar (
    .in_valid(li_cell_valid), .in_data(li_cell_data),
    .sel_valid(cfg_valid), .sel(cfg_sel),
    .out_valid(lc_cell_valid), .out_data(lc_cell_data)
  );

  a_gnt_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    (lc_gnt & ~lc_req_valid) == '0);

endmodule
