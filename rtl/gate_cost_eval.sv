// gate_cost_eval: quality term F2 of a gate-array chromosome (see
// gate_array). F2 = sum of the complexity evaluations EC of all gates
// + sum of the power evaluations EP + for each column the minimum signal
// delay evaluation ESD over its gates, all weights 1, as in the source.
// A gate's evaluations are 10 minus its complexity, power and delay figures;
// a gate that does not reach an output counts 20 on every term. The two
// gates of the last column that are not in the chromosome are not counted.
//
// A gate is used if it is an output gate, or a used gate reads it through an
// input its type depends on (NOT and WIRE read only one input). That rule
// is this design's reading; it reproduces the published per-gate accounts.
// Gate type codes above 9 are undefined in the source and cost like AND here.
//
// Combinational; all outputs follow cfg within the cycle.
module gate_cost_eval
  import ehw_pkg::*;
#(
  parameter int unsigned COLS = 5,
  parameter int unsigned ROWS = 5,
  parameter int unsigned NOUT = 3,
  localparam int unsigned NGATE = (COLS - 1) * ROWS + NOUT
) (
  input  gate_gene_t [NGATE-1:0] cfg,
  output logic [NGATE-1:0]       used,
  output logic [15:0]            ec_sum,
  output logic [15:0]            ep_sum,
  output logic [15:0]            esd_sum,
  output logic [15:0]            f2
);

  // Index width of the gate vector; in-range selectors always fit it.
  localparam int unsigned AW = (NGATE > 1) ? $clog2(NGATE) : 1;

  // Back-trace from the outputs: a gate's use depends only on later gates.
  always_comb begin
    used = '0;
    for (int k = NGATE - 1; k >= 0; k--) begin
      if (k >= (COLS - 1) * ROWS) used[k] = 1'b1;
      if (used[k] && k >= ROWS) begin
        if (gate_uses_1(cfg[k].gt) && 32'(cfg[k].in1) < (k / ROWS) * ROWS)
          used[AW'(cfg[k].in1)] = 1'b1;
        if (gate_uses_2(cfg[k].gt) && 32'(cfg[k].in2) < (k / ROWS) * ROWS)
          used[AW'(cfg[k].in2)] = 1'b1;
      end
    end
  end

  always_comb begin
    int unsigned ec, ep, esd, col_min, e;
    ec = 0; ep = 0; esd = 0;
    for (int c = 0; c < COLS; c++) begin
      col_min = GATE_UNUSED_EVAL;
      for (int r = 0; r < ROWS; r++) begin
        if (c * ROWS + r < NGATE) begin
          if (used[c * ROWS + r]) begin
            ec += 10 - gate_gc(cfg[c * ROWS + r].gt);
            ep += 10 - gate_pw(cfg[c * ROWS + r].gt);
            e   = 10 - gate_sd(cfg[c * ROWS + r].gt);
          end else begin
            ec += GATE_UNUSED_EVAL;
            ep += GATE_UNUSED_EVAL;
            e   = GATE_UNUSED_EVAL;
          end
          if (e < col_min) col_min = e;
        end
      end
      esd += col_min;
    end
    ec_sum  = 16'(ec);
    ep_sum  = 16'(ep);
    esd_sum = 16'(esd);
    f2      = 16'(ec + ep + esd);
  end

endmodule
