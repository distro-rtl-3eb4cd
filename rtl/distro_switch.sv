// distro_switch: a bufferless three-stage Clos-network cell switch
// scheduled by Distro (distributed static round-robin).
//
// The switch has N = n*k ports. Cells wait only in the input port cards
// IP(i,g) (i = input module, g = port in it), one virtual output queue per
// output port OP(j,h) (j = output module, h = port in it). The k input
// modules IM(i), the m central modules CM(r) and the k output modules OM(j)
// are pure crossbars, so the memory of no stage has to run faster than
// the line. Every timeslot a cell may cross only if it wins four
// contention points in turn, each decided by a separate arbiter:
//   Phase 1, IP(i,g):  Arbiter_j picks a VOQ group j, Arbiter_h(j) a VOQ h;
//   Phase 2, LI(i,r):  the link takes the request of port Pointer_g(i,r);
//   Phase 3, LC(r,j):  Arbiter_i(r,j) picks one of the competing LIs;
//   Phase 4, OP(j,h):  Arbiter_r(j,h) picks one of the competing LCs.
// All pointers start in a staggered pattern and advance on a fixed
// schedule whatever they granted, which keeps them out of step with each
// other so that, under heavy uniform load, requests rarely collide.
//
// Timing, one clock per timeslot:
//   cycle t   : cell on in_* with in_ready high, stored in its VOQ
//   cycle t+1 : Phase 1 picks it and loads the IP request register
//   cycle t+2 : Phases 2-4 and the grant return, all combinational; every
//               granted arbiter stores its crossbar setting at the edge
//   cycle t+3 : the cell crosses IM, CM and OM
//   cycle t+4 : the cell is on out_valid/out_data of its output port
// Phases 2-4 of a slot work on the requests Phase 1 made in the slot
// before, so the network's pointers leave reset one cycle after those of
// the input ports (net_rst_n) and stay aligned with them. This two-stage
// split of a timeslot, the flow control on in_ready and all widths and
// depths are this design's own choices; the four phases, the arbiters
// and the pointer schedules follow the Distro algorithm.
//
// Ports: in_valid/in_j/in_h/in_data/in_ready per input port p = i*n + g;
// out_valid/out_data per output port q = j*n + h. Reset is synchronous,
// active low.
module distro_switch #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,      // n
  parameter int unsigned K      = distro_pkg::K_DEF,      // k
  parameter int unsigned M      = distro_pkg::M_DEF,      // m
  parameter int unsigned DATA_W = distro_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = distro_pkg::DEPTH_DEF,
  localparam int unsigned NP = N_PORT * K,
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NP-1:0]             in_valid,
  input  logic [NP-1:0][JW-1:0]     in_j,
  input  logic [NP-1:0][HW-1:0]     in_h,
  input  logic [NP-1:0][DATA_W-1:0] in_data,
  output logic [NP-1:0]             in_ready,
  output logic [NP-1:0]             out_valid,
  output logic [NP-1:0][DATA_W-1:0] out_data
);

  logic net_rst_n;

  // input port cards, grouped per IM: [i][g]
  logic [K-1:0][N_PORT-1:0]             ip_req_valid;
  logic [K-1:0][N_PORT-1:0][JW-1:0]     ip_req_j;
  logic [K-1:0][N_PORT-1:0][HW-1:0]     ip_req_h;
  logic [K-1:0][N_PORT-1:0]             ip_gnt;
  logic [K-1:0][N_PORT-1:0]             ip_cell_valid;
  logic [K-1:0][N_PORT-1:0][DATA_W-1:0] ip_cell_data;

  // links LI(i,r), seen from the IM side [i][r] and the CM side [r][i]
  logic [K-1:0][M-1:0]                  im_li_valid;
  logic [K-1:0][M-1:0][JW-1:0]          im_li_j;
  logic [K-1:0][M-1:0][HW-1:0]          im_li_h;
  logic [K-1:0][M-1:0]                  im_li_gnt;
  logic [K-1:0][M-1:0]                  im_li_cvalid;
  logic [K-1:0][M-1:0][DATA_W-1:0]      im_li_cdata;
  logic [M-1:0][K-1:0]                  cm_li_valid;
  logic [M-1:0][K-1:0][JW-1:0]          cm_li_j;
  logic [M-1:0][K-1:0][HW-1:0]          cm_li_h;
  logic [M-1:0][K-1:0]                  cm_li_gnt;
  logic [M-1:0][K-1:0]                  cm_li_cvalid;
  logic [M-1:0][K-1:0][DATA_W-1:0]      cm_li_cdata;

  // links LC(r,j), seen from the CM side [r][j] and the OM side [j][r]
  logic [M-1:0][K-1:0]                  cm_lc_valid;
  logic [M-1:0][K-1:0][HW-1:0]          cm_lc_h;
  logic [M-1:0][K-1:0]                  cm_lc_gnt;
  logic [M-1:0][K-1:0]                  cm_lc_cvalid;
  logic [M-1:0][K-1:0][DATA_W-1:0]      cm_lc_cdata;
  logic [K-1:0][M-1:0]                  om_lc_valid;
  logic [K-1:0][M-1:0][HW-1:0]          om_lc_h;
  logic [K-1:0][M-1:0]                  om_lc_gnt;
  logic [K-1:0][M-1:0]                  om_lc_cvalid;
  logic [K-1:0][M-1:0][DATA_W-1:0]      om_lc_cdata;

  always_ff @(posedge clk) net_rst_n <= rst_n;

  for (genvar gi = 0; gi < K; gi++) begin : g_im
    for (genvar gg = 0; gg < N_PORT; gg++) begin : g_ip
      input_port #(.N_PORT(N_PORT), .K(K), .DEPTH(DEPTH), .DATA_W(DATA_W),
                   .I_IDX(gi), .G_IDX(gg)) u_ip (
        .clk, .rst_n,
        .in_valid (in_valid[gi*N_PORT+gg]),
        .in_j     (in_j[gi*N_PORT+gg]),
        .in_h     (in_h[gi*N_PORT+gg]),
        .in_data  (in_data[gi*N_PORT+gg]),
        .in_ready (in_ready[gi*N_PORT+gg]),
        .req_valid(ip_req_valid[gi][gg]),
        .req_j    (ip_req_j[gi][gg]),
        .req_h    (ip_req_h[gi][gg]),
        .granted  (ip_gnt[gi][gg]),
        .cell_valid(ip_cell_valid[gi][gg]),
        .cell_data (ip_cell_data[gi][gg])
      );
    end

    input_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W),
                   .I_IDX(gi)) u_im (
      .clk, .rst_n(net_rst_n),
      .ip_req_valid(ip_req_valid[gi]), .ip_req_j(ip_req_j[gi]),
      .ip_req_h(ip_req_h[gi]), .ip_gnt(ip_gnt[gi]),
      .li_req_valid(im_li_valid[gi]), .li_req_j(im_li_j[gi]),
      .li_req_h(im_li_h[gi]), .li_gnt(im_li_gnt[gi]),
      .ip_cell_valid(ip_cell_valid[gi]), .ip_cell_data(ip_cell_data[gi]),
      .li_cell_valid(im_li_cvalid[gi]), .li_cell_data(im_li_cdata[gi])
    );
  end

  // Wiring of the two link stages (the Clos interconnect).
  for (genvar gi = 0; gi < K; gi++) begin : g_li_wire
    for (genvar gr = 0; gr < M; gr++) begin : g_r
      assign cm_li_valid[gr][gi]  = im_li_valid[gi][gr];
      assign cm_li_j[gr][gi]      = im_li_j[gi][gr];
      assign cm_li_h[gr][gi]      = im_li_h[gi][gr];
      assign im_li_gnt[gi][gr]    = cm_li_gnt[gr][gi];
      assign cm_li_cvalid[gr][gi] = im_li_cvalid[gi][gr];
      assign cm_li_cdata[gr][gi]  = im_li_cdata[gi][gr];
    end
  end

  for (genvar gj = 0; gj < K; gj++) begin : g_lc_wire
    for (genvar gr = 0; gr < M; gr++) begin : g_r
      assign om_lc_valid[gj][gr]  = cm_lc_valid[gr][gj];
      assign om_lc_h[gj][gr]      = cm_lc_h[gr][gj];
      assign cm_lc_gnt[gr][gj]    = om_lc_gnt[gj][gr];
      assign om_lc_cvalid[gj][gr] = cm_lc_cvalid[gr][gj];
      assign om_lc_cdata[gj][gr]  = cm_lc_cdata[gr][gj];
    end
  end

  for (genvar gr = 0; gr < M; gr++) begin : g_cm
    central_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W),
                     .R_IDX(gr)) u_cm (
      .clk, .rst_n(net_rst_n),
      .li_req_valid(cm_li_valid[gr]), .li_req_j(cm_li_j[gr]),
      .li_req_h(cm_li_h[gr]), .li_gnt(cm_li_gnt[gr]),
      .lc_req_valid(cm_lc_valid[gr]), .lc_req_h(cm_lc_h[gr]),
      .lc_gnt(cm_lc_gnt[gr]),
      .li_cell_valid(cm_li_cvalid[gr]), .li_cell_data(cm_li_cdata[gr]),
      .lc_cell_valid(cm_lc_cvalid[gr]), .lc_cell_data(cm_lc_cdata[gr])
    );
  end

  for (genvar gj = 0; gj < K; gj++) begin : g_om
    output_module #(.N_PORT(N_PORT), .K(K), .M(M), .DATA_W(DATA_W),
                    .J_IDX(gj)) u_om (
      .clk, .rst_n(net_rst_n),
      .lc_req_valid(om_lc_valid[gj]), .lc_req_h(om_lc_h[gj]),
      .lc_gnt(om_lc_gnt[gj]),
      .lc_cell_valid(om_lc_cvalid[gj]), .lc_cell_data(om_lc_cdata[gj]),
      .out_valid(out_valid[gj*N_PORT +: N_PORT]),
      .out_data(out_data[gj*N_PORT +: N_PORT])
    );
  end

endmodule
