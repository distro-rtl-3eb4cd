// crossbar: bufferless NI x NO crossbar switching element.
//
// Every switching stage of the bufferless Clos switch (input, central and
// output modules) is a plain crossbar with no cell storage. Output o is
// connected to input sel[o] when sel_valid[o] is set and then carries that
// input's cell and valid flag; otherwise it is idle. The scheduler makes
// sure no input is selected by two outputs. Purely combinational.
module crossbar #(
  parameter int unsigned NI = 8,
  parameter int unsigned NO = 8,
  parameter int unsigned W  = 64,
  localparam int unsigned SW = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic [NI-1:0]         in_valid,
  input  logic [NI-1:0][W-1:0]  in_data,
  input  logic [NO-1:0]         sel_valid,
  input  logic [NO-1:0][SW-1:0] sel,
  output logic [NO-1:0]         out_valid,
  output logic [NO-1:0][W-1:0]  out_data
);

  always_comb begin
    for (int unsigned o = 0; o < NO; o++) begin
      out_valid[o] = sel_valid[o] && in_valid[sel[o]];
      out_data[o]  = sel_valid[o] ? in_data[sel[o]] : '0;
    end
  end

endmodule
