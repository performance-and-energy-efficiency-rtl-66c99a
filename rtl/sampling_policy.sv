// sampling_policy: sampling-based choice among the four out-of-order modes.
//
// Execution is cut into quanta of QUANTUM committed instructions and each
// quantum into intervals of INTERVAL instructions (document defaults 10M and
// 100K). The first 4*REPL intervals of a quantum are sampling intervals: the
// core runs mode (i mod 4) in interval i and the number of cycles (the
// inverse of performance, for a fixed instruction count) and the energy of the
// interval are added up per mode. At the end of sampling the choice is made
// from the sums and the objective, and the chosen mode is used for the rest of
// the quantum. Objectives: 0 highest performance (fewest cycles), 1 lowest
// energy, 2 lowest energy among the modes whose performance is within
// x_pct percent of the best, i.e. cycles*(100-x) <= best_cycles*100.
//
// Modes: 0 = 4-wide/192-entry (full OutofOrder), 1 = 4-wide/48-entry,
// 2 = 2-wide/192-entry, 3 = 2-wide/48-entry; mode[1] is the half-width bit and
// mode[0] the small-window bit. The document leaves the energy measurement to
// its power model, so energy arrives here as a per-cycle input. Counting
// pauses while the core is not in OutofOrder mode or a mode change is in
// progress (hold). The choice is made in hardware here; the document runs it
// as a short firmware routine.
module sampling_policy #(
  parameter int QUANTUM  = 10_000_000,
  parameter int INTERVAL = 100_000,
  parameter int REPL     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic [2:0]  commits,     // instructions committed this cycle
  input  logic [15:0] energy,      // energy spent this cycle
  input  logic [1:0]  objective,
  input  logic [6:0]  x_pct,
  output logic [1:0]  mode,
  output logic        sampling,
  output logic        decided,     // one-cycle pulse when a mode is chosen
  output logic [1:0]  chosen
);
  localparam int NSAMP = 4 * REPL;
  localparam int NINT  = QUANTUM / INTERVAL;

  logic [31:0]      icnt_q;            // instructions in this interval
  logic [31:0]      int_q;             // interval number within the quantum
  logic [3:0][47:0] cyc_q;
  logic [3:0][55:0] en_q;
  logic [47:0]      cur_cyc_q;
  logic [55:0]      cur_en_q;
  logic [1:0]       chosen_q;

  assign sampling = int_q < NSAMP;
  assign mode     = sampling ? 2'(int_q % 4) : chosen_q;
  assign chosen   = chosen_q;

  // end of interval
  logic        iend;
  logic [31:0] icnt_n;
  assign icnt_n = icnt_q + 32'(commits);
  assign iend   = !hold && icnt_n >= INTERVAL;

  // decision, from the totals including the interval that ends now
  logic [1:0] pick;
  always_comb begin
    automatic logic [3:0][47:0] c = cyc_q;
    automatic logic [3:0][55:0] e = en_q;
    automatic logic [47:0] best_c;
    automatic logic [55:0] best_e;
    automatic logic        have = 1'b0;
    automatic int m = int_q % 4;
    c[m] = c[m] + cur_cyc_q + 48'd1;
    e[m] = e[m] + cur_en_q + 56'(energy);
    best_c = c[0];
    for (int i = 1; i < 4; i++) if (c[i] < best_c) best_c = c[i];
    pick   = 2'd0;
    best_e = '1;
    for (int i = 0; i < 4; i++) begin
      automatic logic ok;
      unique case (objective)
        2'd0:    ok = c[i] == best_c;
        2'd1:    ok = 1'b1;
        default: ok = 56'(c[i]) * 56'(100 - int'(x_pct)) <= 56'(best_c) * 56'd100;
      endcase
      if (objective == 2'd0) begin
        if (ok && !have) begin have = 1'b1; pick = 2'(i); end
      end else if (ok && (!have || e[i] < best_e)) begin
        have = 1'b1; best_e = e[i]; pick = 2'(i);
      end
    end
  end

  assign decided = iend && int_q == NSAMP - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt_q    <= '0;
      int_q     <= '0;
      cyc_q     <= '0;
      en_q      <= '0;
      cur_cyc_q <= '0;
      cur_en_q  <= '0;
      chosen_q  <= '0;
    end else if (!hold) begin
      if (iend) begin
        icnt_q    <= icnt_n - INTERVAL;
        cur_cyc_q <= '0;
        cur_en_q  <= '0;
        if (sampling) begin
          cyc_q[int_q % 4] <= cyc_q[int_q % 4] + cur_cyc_q + 48'd1;
          en_q[int_q % 4]  <= en_q[int_q % 4] + cur_en_q + 56'(energy);
        end
        if (decided) chosen_q <= pick;
        if (int_q + 1 >= NINT) begin
          int_q <= '0;
          cyc_q <= '0;
          en_q  <= '0;
        end else begin
          int_q <= int_q + 1;
        end
      end else begin
        icnt_q    <= icnt_n;
        cur_cyc_q <= cur_cyc_q + 48'd1;
        cur_en_q  <= cur_en_q + 56'(energy);
      end
    end
  end

endmodule
