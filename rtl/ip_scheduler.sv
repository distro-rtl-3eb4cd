// ip_scheduler: Phase 1 of Distro, the request selection in input port
// IP(i,g).
//
// Structure (following the published Distro input-port scheduler): a state register
// that says which VOQs hold a cell and which VOQ groups (all VOQs bound for
// one output module j) hold any; Arbiter_j, a k-input round-robin arbiter
// that picks a non-empty group; k Arbiter_h, each an n-input round-robin
// arbiter that picks a non-empty VOQ inside its group; and the request
// register that keeps the chosen pair [j,h] for the rest of the scheduler.
// Both arbiters work in parallel; the pair is formed from Arbiter_j's
// choice and the choice of the Arbiter_h of that group.
//
// Static round-robin: Pointer_j advances by one every timeslot and every
// Pointer_h advances by one every k timeslots, whatever was granted. Reset
// values are Pointer_j = (g+i) % k and Pointer_h = i (see distro_pkg).
//
// The state register is kept here as one count per VOQ of the cells that
// are stored and not yet requested; the published design's per-VOQ and per-group
// state bits are the non-zero flags of those counts. A cell stops counting
// when its VOQ is put in the request register and counts again if that
// request is not granted. This keeps a VOQ holding a single cell from
// being requested a second time while its first request is still in
// flight (this bookkeeping is this design's own; the published design does not
// say how the state register is kept up to date).
//
// Timing: one clock is one timeslot. arr_* reports a cell stored in the
// VOQs this cycle. The request register is loaded at the clock edge and
// is answered by `granted` during the following cycle.
module ip_scheduler #(
  parameter int unsigned N_PORT = distro_pkg::N_DEF,   // n: output ports per OM = VOQs per group
  parameter int unsigned K      = distro_pkg::K_DEF,   // k: output modules = VOQ groups
  parameter int unsigned DEPTH  = distro_pkg::DEPTH_DEF,   // cells per VOQ
  parameter int unsigned I_IDX  = 0,   // i: input module of this port
  parameter int unsigned G_IDX  = 0,   // g: port number inside the IM
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arr_valid,   // a cell for [arr_j,arr_h] was stored
  input  logic [JW-1:0] arr_j,
  input  logic [HW-1:0] arr_h,
  input  logic          granted,     // the request register's request won
  output logic          req_valid,   // request register
  output logic [JW-1:0] req_j,
  output logic [HW-1:0] req_h
);
  import distro_pkg::*;

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [K-1:0][N_PORT-1:0][CW-1:0] elig;     // cells not yet requested
  logic [K-1:0][N_PORT-1:0]         voq_st;   // VOQ holds an eligible cell
  logic [K-1:0]                     grp_st;   // VOQ group holds one

  logic [JW-1:0]            ptr_j;
  logic [K-1:0][HW-1:0]     ptr_h;
  logic [JW-1:0]            slot_cnt;         // timeslot count modulo k

  logic                     aj_valid;
  logic [JW-1:0]            aj_idx;
  logic [K-1:0]             ah_valid;
  logic [K-1:0][HW-1:0]     ah_idx;

  logic                     sel_valid;
  logic [JW-1:0]            sel_j;
  logic [HW-1:0]            sel_h;

  always_comb begin
    for (int unsigned j = 0; j < K; j++) begin
      for (int unsigned h = 0; h < N_PORT; h++)
        voq_st[j][h] = (elig[j][h] != '0);
      grp_st[j] = |voq_st[j];
    end
  end

  rr_arbiter #(.N(K)) u_arbiter_j (
    .req(grp_st), .ptr(ptr_j),
    .gnt_valid(aj_valid), .gnt_idx(aj_idx), .gnt()
  );

  for (genvar gj = 0; gj < K; gj++) begin : g_arbiter_h
    rr_arbiter #(.N(N_PORT)) u_arbiter_h (
      .req(voq_st[gj]), .ptr(ptr_h[gj]),
      .gnt_valid(ah_valid[gj]), .gnt_idx(ah_idx[gj]), .gnt()
    );
  end

  // The request is [j,h] only when j won Arbiter_j and h won Arbiter_h(j).
  assign sel_valid = aj_valid && ah_valid[aj_idx];
  assign sel_j     = aj_idx;
  assign sel_h     = ah_idx[aj_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      elig      <= '0;
      req_valid <= 1'b0;
      req_j     <= '0;
      req_h     <= '0;
      ptr_j     <= JW'(init_ptr_j(I_IDX, G_IDX, K));
      for (int unsigned j = 0; j < K; j++)
        ptr_h[j] <= HW'(init_ptr_h(I_IDX, N_PORT));
      slot_cnt  <= '0;
    end else begin
      for (int unsigned j = 0; j < K; j++)
        for (int unsigned h = 0; h < N_PORT; h++) begin
          elig[j][h] <= elig[j][h]
            + CW'(arr_valid && 32'(arr_j) == j && 32'(arr_h) == h)
            + CW'(req_valid && !granted && 32'(req_j) == j && 32'(req_h) == h)
            - CW'(sel_valid && 32'(sel_j) == j && 32'(sel_h) == h);
        end
      req_valid <= sel_valid;
      req_j     <= sel_j;
      req_h     <= sel_h;
      // Static pointer schedule.
      ptr_j    <= (32'(ptr_j) == K - 1) ? '0 : ptr_j + 1'b1;
      slot_cnt <= (32'(slot_cnt) == K - 1) ? '0 : slot_cnt + 1'b1;
      if (32'(slot_cnt) == K - 1)
        for (int unsigned j = 0; j < K; j++)
          ptr_h[j] <= (32'(ptr_h[j]) == N_PORT - 1) ? '0 : ptr_h[j] + 1'b1;
    end
  end

  // A grant can only answer a request that was made.
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                      granted |-> req_valid);

endmodule
