// tb_crossbar: self-checking test of the crossbar switching element.
// Random connection settings and cells; every output must carry exactly
// the cell of the input it selects, or be idle.
module tb_crossbar;
  localparam int unsigned NI = 6;
  localparam int unsigned NO = 5;
  localparam int unsigned W  = 16;
  localparam int unsigned SW = $clog2(NI);

  logic [NI-1:0]         in_valid;
  logic [NI-1:0][W-1:0]  in_data;
  logic [NO-1:0]         sel_valid;
  logic [NO-1:0][SW-1:0] sel;
  logic [NO-1:0]         out_valid;
  logic [NO-1:0][W-1:0]  out_data;
  int checks = 0;
  int failures = 0;

  crossbar #(.NI(NI), .NO(NO), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int x = 0; x < NI; x++) begin
        in_valid[x] = 1'($urandom);
        in_data[x]  = W'($urandom);
      end
      for (int o = 0; o < NO; o++) begin
        sel_valid[o] = 1'($urandom);
        sel[o]       = SW'($urandom_range(NI - 1));
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (sel_valid[o]) begin
          if (out_valid[o] !== in_valid[sel[o]] || out_data[o] !== in_data[sel[o]]) begin
            failures++;
            $display("FAIL out %0d sel %0d: got %0b/%h", o, sel[o], out_valid[o], out_data[o]);
          end
        end else if (out_valid[o] !== 1'b0) begin
          failures++;
          $display("FAIL out %0d idle but valid", o);
        end
      end
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
