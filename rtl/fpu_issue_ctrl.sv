// fpu_issue_ctrl: issue and stall control for the three pipelines.
//
// The pipelines share one result port but have different latencies (adder
// and multiplier LAT_ADD/LAT_MUL cycles, divider LAT_DIV cycles), so an op
// decoded now could complete in the same cycle as one issued earlier. The
// controller keeps a reservation vector res[i] = "the result port is taken i
// cycles from now". A decoded op of latency L issues only if res[L] is free
// and, for a divide, the divider is ready; otherwise stall is raised and the
// integer unit holds the instruction. Issuing marks res[L]; every cycle the
// vector shifts by one. It is clocked by the ungated clock.
// Interface: dec_valid/unit come from the decoder in the same cycle; issue
// and stall are combinational outputs for that cycle.
// The reservation scheme is this design's choice; the design only states that
// the three pipelines are independent and share the FPU data output.
module fpu_issue_ctrl
  import fpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dec_valid,
  input  unit_e unit,
  input  logic  div_ready,
  output logic  issue,
  output logic  stall
);

  logic [LAT_MAX:1] res_q, res_d;
  int               lat;
  logic             conflict;

  always_comb begin
    unique case (unit)
      UNIT_MUL: lat = LAT_MUL;
      UNIT_DIV: lat = LAT_DIV;
      default:  lat = LAT_ADD;
    endcase
    conflict = res_q[lat];
    stall    = dec_valid && (conflict || (unit == UNIT_DIV && !div_ready));
    issue    = dec_valid && !stall;
    for (int i = 1; i <= LAT_MAX; i++) begin
      res_d[i] = ((i < LAT_MAX) ? res_q[(i < LAT_MAX) ? i + 1 : i] : 1'b0)
               | (issue && (lat == i + 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else        res_q <= res_d;
  end

endmodule
