// rr_arbiter: round-robin arbiter built as a programmable priority encoder.
//
// Grants the first asserted request at or after position `ptr`, wrapping
// round to position 0. As in the classic iSLIP arbiter it uses two simple
// priority encoders: one over the requests at or above the pointer, one
// over all requests; the first wins when it finds anything. The pointer is
// an input, so the caller decides how it moves; in Distro every pointer
// moves on a fixed schedule, independent of the grant.
//
// Interface: req[N] requests, ptr the highest-priority position (0..N-1),
// gnt one-hot grant, gnt_idx its index, gnt_valid set when any request is
// present. Purely combinational, no clock.
module rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] req,
  input  logic [W-1:0] ptr,
  output logic         gnt_valid,
  output logic [W-1:0] gnt_idx,
  output logic [N-1:0] gnt
);

  logic [N-1:0] upper;      // requests at or above the pointer
  logic         upper_hit;
  logic [W-1:0] upper_idx;
  logic         any_hit;
  logic [W-1:0] any_idx;

  always_comb begin
    for (int unsigned x = 0; x < N; x++)
      upper[x] = req[x] && (x >= 32'(ptr));
  end

  // Priority encoder over the requests at or above the pointer.
  always_comb begin
    upper_hit = 1'b0;
    upper_idx = '0;
    for (int unsigned x = 0; x < N; x++)
      if (!upper_hit && upper[x]) begin
        upper_hit = 1'b1;
        upper_idx = W'(x);
      end
  end

  // Priority encoder over all requests (the wrap-around case).
  always_comb begin
    any_hit = 1'b0;
    any_idx = '0;
    for (int unsigned x = 0; x < N; x++)
      if (!any_hit && req[x]) begin
        any_hit = 1'b1;
        any_idx = W'(x);
      end
  end

  always_comb begin
    gnt_valid = any_hit;
    gnt_idx   = upper_hit ? upper_idx : any_idx;
    gnt       = '0;
    if (any_hit) gnt[gnt_idx] = 1'b1;
  end

endmodule
