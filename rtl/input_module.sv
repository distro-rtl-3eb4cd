// input_module: input module IM(i), an n x m crossbar with the Phase 2
// arbiters of its m outgoing links LI(i,r).
//
// Phase 2 of Distro: link LI(i,r) takes the request [j,h] of exactly one
// input port, the one its Arbiter_g(i,r) points at (Pointer_g(i,r) == g),
// and passes it on to link LC(r,j) of central module r. No search is
// made; the pointers advance by one every timeslot and, started as a
// permutation, always connect each input port to a different link, so the
// IM crossbar never has a conflict. The grant that comes back from CM(r)
// for LI(i,r) is handed to the port that link served.
//
// Pointer_g counts modulo m. The published rule gives the pointer only for links
// that serve a port; with m > n the extra links carry spare pointer values
// n..m-1 that select no port (this design's own reading, see distro_pkg).
//
// Timing (one clock = one timeslot): ip_req_* in, li_req_* out and the
// returned li_gnt -> ip_gnt path are combinational within a cycle. A link
// that was granted stores its crossbar setting at the clock edge, and the
// cell then crosses from ip_cell_* to li_cell_* during the next cycle.
module input_module #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,
  parameter int unsigned K      = distro_pkg::K_DEF,
  parameter int unsigned M      = distro_pkg::M_DEF,
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  parameter int unsigned I_IDX  = 0,
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // requests from the n input ports and grants back to them
  input  logic [N_PORT-1:0]            ip_req_valid,
  input  logic [N_PORT-1:0][JW-1:0]    ip_req_j,
  input  logic [N_PORT-1:0][HW-1:0]    ip_req_h,
  output logic [N_PORT-1:0]            ip_gnt,
  // requests on the m links LI(i,r) and the grants from the CMs
  output logic [M-1:0]                 li_req_valid,
  output logic [M-1:0][JW-1:0]         li_req_j,
  output logic [M-1:0][HW-1:0]         li_req_h,
  input  logic [M-1:0]                 li_gnt,
  // cells
  input  logic [N_PORT-1:0]            ip_cell_valid,
  input  logic [N_PORT-1:0][DATA_W-1:0] ip_cell_data,
  output logic [M-1:0]                 li_cell_valid,
  output logic [M-1:0][DATA_W-1:0]     li_cell_data
);
  import distro_pkg::*;

  localparam int unsigned GW = (M > 1) ? $clog2(M) : 1;   // pointer width
  localparam int unsigned SW = (N_PORT > 1) ? $clog2(N_PORT) : 1;

  logic [M-1:0][GW-1:0] ptr_g;
  logic [M-1:0]         serves;      // pointer names a real input port
  logic [M-1:0]         cfg_valid;   // crossbar setting for the next slot
  logic [M-1:0][SW-1:0] cfg_sel;

  always_comb begin
    for (int unsigned r = 0; r < M; r++) begin
      serves[r]       = 32'(ptr_g[r]) < N_PORT;
      li_req_valid[r] = serves[r] && ip_req_valid[SW'(ptr_g[r])];
      li_req_j[r]     = ip_req_j[SW'(ptr_g[r])];
      li_req_h[r]     = ip_req_h[SW'(ptr_g[r])];
    end
  end

  always_comb begin
    ip_gnt = '0;
    for (int unsigned r = 0; r < M; r++)
      if (li_req_valid[r] && li_gnt[r]) ip_gnt[SW'(ptr_g[r])] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < M; r++)
        ptr_g[r] <= GW'(init_ptr_g(I_IDX, r, N_PORT, K, M));
      cfg_valid <= '0;
      cfg_sel   <= '0;
    end else begin
      for (int unsigned r = 0; r < M; r++) begin
        ptr_g[r]     <= (32'(ptr_g[r]) == M - 1) ? '0 : ptr_g[r] + 1'b1;
        cfg_valid[r] <= li_req_valid[r] && li_gnt[r];
        cfg_sel[r]   <= SW'(ptr_g[r]);
      end
    end
  end

  crossbar #(.NI(N_PORT), .NO(M), .W(DATA_W)) u_xbar (
    .in_valid(ip_cell_valid), .in_data(ip_cell_data),
    .sel_valid(cfg_valid), .sel(cfg_sel),
    .out_valid(li_cell_valid), .out_data(li_cell_data)
  );

  // A link may only be granted a request it forwarded.
  a_gnt_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    (li_gnt & ~li_req_valid) == '0);

endmodule
