// tb_distro_switch_full: the end-to-end test of tb_distro_switch run on
// the switch exactly as configured by default, n = m = k = 8 (64 ports),
// with no parameter overridden. The phases and checks are the same:
//
// Each input port has a source that offers at most one cell per slot and
// holds a cell the switch refuses (in_ready low). A cell carries its source
// port, destination port and a serial number; a scoreboard checks that
// every cell leaves at its own output port, exactly once, in order per
// input/output pair, no sooner than the four-slot minimum latency, and that
// nothing is lost. Phases:
//   light   uniform random traffic at load 0.1: the minimum latency must be
//           exactly 4 slots;
//   medium  uniform random traffic at load 0.6;
//   full    every input keeps all its VOQs backlogged at load 1.0: after a
//           warm-up every output must carry a cell in every slot (100%
//           throughput, the pointers being fully out of step);
//   hotspot every input sends to output 0: VOQs fill and in_ready drops;
//   drain   no arrivals until every accepted cell has left.
// Mechanisms counted (each must occur): refused requests, contention at an
// LC, contention at an OP, refused arrivals, and output-port pointer steps.
// Mean delays are printed per phase.
module tb_distro_switch_full;
  localparam int unsigned N_PORT = distro_pkg::N_DEF;
  localparam int unsigned K = distro_pkg::K_DEF;
  localparam int unsigned M = distro_pkg::M_DEF;
  localparam int unsigned DATA_W = distro_pkg::DATA_W_DEF;
  localparam int unsigned NP = N_PORT * K;
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned HW = (N_PORT > 1) ? $clog2(N_PORT) : 1;
  localparam int unsigned MIN_LAT = 4;

  localparam int LIGHT_SLOTS = 800;
  localparam int MEDIUM_SLOTS = 1500;
  localparam int FULL_SLOTS = 3000;
  localparam int FULL_MEASURE = 1000;   // last slots of the full phase measured
  localparam int HOT_SLOTS = 200;
  localparam int DRAIN_LIMIT = 20000;

  logic clk = 0;
  logic rst_n;
  logic [NP-1:0]             in_valid;
  logic [NP-1:0][JW-1:0]     in_j;
  logic [NP-1:0][HW-1:0]     in_h;
  logic [NP-1:0][DATA_W-1:0] in_data;
  logic [NP-1:0]             in_ready;
  logic [NP-1:0]             out_valid;
  logic [NP-1:0][DATA_W-1:0] out_data;

  distro_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  // scoreboard
  longint t_in [longint];
  longint last_id [NP][NP];
  int     outstanding [NP][NP];
  longint next_id = 1;
  longint accepted = 0;
  longint delivered = 0;
  longint lat_sum = 0;
  longint lat_cnt = 0;
  longint min_lat = 1 << 30;

  // mechanism counters
  longint n_refused_req = 0;
  longint n_lc_contention = 0;
  longint n_op_contention = 0;
  longint n_refused_arrival = 0;
  longint n_ptr_r_steps = 0;

  // sources
  int  phase;                 // 0 idle, 1 random, 2 backlog, 3 hotspot
  int  load_pct;
  bit  measuring;
  longint measured_cells = 0;
  longint measured_slots = 0;

  function automatic logic [DATA_W-1:0] make_cell(int src, int dst, longint id);
    return {16'(src), 16'(dst), 32'(id)};
  endfunction

  function automatic int pick_dest(int src);
    int best, best_cnt, d;
    case (phase)
      2: begin
        best = 0; best_cnt = 1 << 30;
        for (int s = 0; s < NP; s++) begin
          d = (src + int'(cycle) + s) % NP;
          if (outstanding[src][d] < best_cnt) begin
            best = d; best_cnt = outstanding[src][d];
          end
        end
        return best;
      end
      3: return 0;
      default: return $urandom_range(NP - 1);
    endcase
  endfunction

  // Drive new cells on the falling edge; a refused cell stays offered.
  always @(negedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NP; p++) begin
        if (!in_valid[p] || in_ready[p]) begin
          bit offer;
          case (phase)
            1: offer = $urandom_range(99) < load_pct;
            2, 3: offer = 1;
            default: offer = 0;
          endcase
          if (offer) begin
            int d;
            d = pick_dest(p);
            in_valid[p] = 1'b1;
            in_j[p] = JW'(d / N_PORT);
            in_h[p] = HW'(d % N_PORT);
            in_data[p] = make_cell(p, d, next_id);
            next_id++;
          end else begin
            in_valid[p] = 1'b0;
          end
        end
      end
    end
  end

  // Observe just before the rising edge, then record acceptances.
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      // mechanisms inside the switch
      for (int i = 0; i < K; i++)
        for (int g = 0; g < N_PORT; g++)
          if (dut.ip_req_valid[i][g] && !dut.ip_gnt[i][g]) n_refused_req++;
      for (int r = 0; r < M; r++)
        for (int j = 0; j < K; j++) begin
          int c;
          c = 0;
          for (int i = 0; i < K; i++)
            if (dut.cm_li_valid[r][i] && int'(dut.cm_li_j[r][i]) == j) c++;
          if (c > 1) n_lc_contention++;
        end
      for (int j = 0; j < K; j++)
        for (int h = 0; h < N_PORT; h++) begin
          int c;
          c = 0;
          for (int r = 0; r < M; r++)
            if (dut.om_lc_valid[j][r] && int'(dut.om_lc_h[j][r]) == h) c++;
          if (c > 1) n_op_contention++;
        end
      if (dut.g_om[0].u_om.slot_cnt == JW'(K - 1)) n_ptr_r_steps++;
      // arrivals
      for (int p = 0; p < NP; p++) begin
        if (in_valid[p] && !in_ready[p]) n_refused_arrival++;
        if (in_valid[p] && in_ready[p]) begin
          longint id;
          int d;
          id = longint'(in_data[p][31:0]);
          d = int'(in_data[p][47:32]);
          t_in[id] = cycle;
          outstanding[p][d]++;
          accepted++;
        end
      end
      // departures
      if (measuring) measured_slots++;
      for (int q = 0; q < NP; q++) begin
        if (out_valid[q]) begin
          longint id, lat;
          int s, d;
          s = int'(out_data[q][63:48]);
          d = int'(out_data[q][47:32]);
          id = longint'(out_data[q][31:0]);
          checks++;
          if (d != q || s >= int'(NP) || !t_in.exists(id)) begin
            failures++;
            $display("FAIL cycle %0d: output %0d got cell id %0d src %0d dst %0d", cycle, q, id, s, d);
          end else begin
            lat = cycle - t_in[id];
            t_in.delete(id);
            checks++;
            if (id <= last_id[s][d] || lat < MIN_LAT) begin
              failures++;
              $display("FAIL cycle %0d: cell %0d from %0d to %0d out of order or early (lat %0d)",
                       cycle, id, s, d, lat);
            end
            last_id[s][d] = id;
            outstanding[s][d]--;
            delivered++;
            lat_sum += lat;
            lat_cnt++;
            if (lat < min_lat) min_lat = lat;
            if (measuring) measured_cells++;
          end
        end
      end
    end
  end

  task automatic run_phase(string name, int ph, int pct, int slots);
    phase = ph;
    load_pct = pct;
    lat_sum = 0;
    lat_cnt = 0;
    repeat (slots) @(posedge clk);
    if (lat_cnt > 0)
      $display("%-8s load %0d%%: %0d cells delivered, mean delay %0.2f slots beyond the %0d-slot pipeline",
               name, pct, lat_cnt, real'(lat_sum) / real'(lat_cnt) - real'(MIN_LAT), MIN_LAT);
  endtask

  initial begin
    rst_n = 0;
    in_valid = '0; in_j = '0; in_h = '0; in_data = '0;
    phase = 0; load_pct = 0; measuring = 0;
    for (int s = 0; s < NP; s++)
      for (int d = 0; d < NP; d++) begin
        last_id[s][d] = 0;
        outstanding[s][d] = 0;
      end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    run_phase("light", 1, 10, LIGHT_SLOTS);
    checks++;
    if (min_lat != MIN_LAT) begin
      failures++;
      $display("FAIL minimum latency %0d, expected %0d", min_lat, MIN_LAT);
    end
    run_phase("medium", 1, 60, MEDIUM_SLOTS);
    run_phase("full", 2, 100, FULL_SLOTS - FULL_MEASURE);
    measuring = 1;
    run_phase("full", 2, 100, FULL_MEASURE);
    measuring = 0;
    $display("full load throughput: %0d cells in %0d slots on %0d outputs = %0.4f",
             measured_cells, measured_slots, NP,
             real'(measured_cells) / real'(measured_slots * NP));
    checks++;
    if (measured_cells != measured_slots * NP) begin
      failures++;
      $display("FAIL throughput below 100%% with every VOQ backlogged");
    end
    run_phase("hotspot", 3, 100, HOT_SLOTS);
    phase = 0;
    @(negedge clk);
    in_valid = '0;
    for (int w = 0; w < DRAIN_LIMIT && delivered < accepted; w++) @(posedge clk);
    repeat (2 * MIN_LAT) @(posedge clk);
    checks++;
    if (delivered != accepted || t_in.num() != 0) begin
      failures++;
      $display("FAIL %0d accepted, %0d delivered", accepted, delivered);
    end
    $display("cells accepted %0d delivered %0d", accepted, delivered);
    $display("mechanisms: refused requests %0d, LC contention %0d, OP contention %0d, refused arrivals %0d, Pointer_r steps %0d",
             n_refused_req, n_lc_contention, n_op_contention, n_refused_arrival, n_ptr_r_steps);
    checks++;
    if (n_refused_req == 0 || n_lc_contention == 0 || n_op_contention == 0 ||
        n_refused_arrival == 0 || n_ptr_r_steps == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (LIGHT_SLOTS + MEDIUM_SLOTS + FULL_SLOTS + HOT_SLOTS + DRAIN_LIMIT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
