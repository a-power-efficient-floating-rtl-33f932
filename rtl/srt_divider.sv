// srt_divider: radix-4 SRT divider for the significands, one quotient digit per cycle.
//
// Computes x/d for a divisor d = D*2^-52 in [1,2) and an aligned dividend
// x = X*2^-53 in [d/2, d), so that the quotient lies in [1/2, 1). The partial
// remainder is kept in two's complement with 55 fraction bits and starts at
// r0 = x/4 (which meets the SRT bound |r| <= 2d/3). Each cycle computes
//     r(j+1) = 4 r(j) - q(j+1) d,   q(j+1) in {-2,-1,0,1,2}
// where the digit comes from a quotient-digit selection table (QST) indexed by
// a truncated estimate of 4r (4 fraction bits) and the three leading fraction
// bits of d. The table holds, for each of the eight divisor intervals, the
// lowest estimate at which digits -1, 0, +1 and +2 are chosen; these
// thresholds are computed at elaboration from the containment condition
// (q-2/3)d <= 4r <= (q+2/3)d over the whole table cell, so no table file is
// needed. The quotient is assembled by on-the-fly conversion (registers Q and
// Q-1, digits appended without carry propagation). After ITER digits a
// negative final remainder selects Q-1 and the remainder is corrected by +d,
// which makes the quotient exactly truncated and rem_nz an exact sticky bit.
// Interface: start loads x and d at a rising edge (ignored while busy);
// busy stays high for ITER cycles; done pulses for one cycle with
// quo = floor(x/d * 2^(2*ITER-2)) and rem_nz. Latency from start to done is
// ITER+1 edges. Radix 4 and the table-based digit selection follow the
// design's divider; table dimensions and the non-redundant remainder are this
// design's choices.
module srt_divider #(
  parameter int ITER = 28,       // quotient digits (2 bits each)
  parameter int QR_FRAC = 4,     // fraction bits of the remainder estimate
  parameter int QD_FRAC = 3      // fraction bits of d used by the table
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [53:0]        x,
  input  logic [52:0]        d,
  output logic               busy,
  output logic               done,
  output logic [2*ITER-1:0]  quo,
  output logic               rem_nz
);

  localparam int F   = 55;         // fraction bits of the partial remainder
  localparam int RW  = F + 4;      // remainder width: sign + 3 integer bits
  localparam int EW  = RW - (F - QR_FRAC);  // estimate width
  localparam int NI  = 1 << QD_FRAC;        // divisor intervals

  // ---------------------------------------------------------------- QST
  function automatic int floor_div(int n, int dv);
    int q;
    q = n / dv;
    if ((n % dv != 0) && (n < 0)) q = q - 1;
    return q;
  endfunction

  function automatic int ceil_div(int n, int dv);
    return -floor_div(-n, dv);
  endfunction

  // smallest estimate E (units of 2^-QR_FRAC) for which digit q is selected
  // in divisor interval i: E >= (q - 2/3) * d over the interval
  function automatic int qst_low(int q, int i);
    int dsel;
    dsel = (3 * q - 2 > 0) ? (NI + i + 1) : (NI + i);
    return ceil_div((3 * q - 2) * dsel * (1 << QR_FRAC), 3 * NI);
  endfunction

  logic signed [EW-1:0] thr [NI][4];   // thresholds for q = -1, 0, 1, 2

  for (genvar i = 0; i < NI; i++) begin : g_qst
    for (genvar j = 0; j < 4; j++) begin : g_q
      localparam int LOW = qst_low(j - 1, i);
      assign thr[i][j] = EW'(LOW);
    end
  end

  // ---------------------------------------------------------------- datapath
  logic signed [RW-1:0]  r_q, r4, dfx, r_next, r_fix;
  logic [2*ITER-1:0]     qp_q, qm_q, qp_next, qm_next;
  logic [$clog2(ITER+1)-1:0] cnt_q;
  logic [52:0]           d_q;
  logic signed [EW-1:0]  est;
  logic [QD_FRAC-1:0]    didx;
  logic signed [2:0]     qd;

  always_comb begin
    dfx  = RW'({d_q, 3'b000});       // d with F fraction bits
    r4   = r_q <<< 2;
    est  = r4[RW-1 -: EW];           // floor of 4r to QR_FRAC fraction bits
    didx = d_q[51 -: QD_FRAC];

    if      (est >= thr[didx][3]) qd =  3'sd2;
    else if (est >= thr[didx][2]) qd =  3'sd1;
    else if (est >= thr[didx][1]) qd =  3'sd0;
    else if (est >= thr[didx][0]) qd = -3'sd1;
    else                          qd = -3'sd2;

    unique case (qd)
      3'sd2:   r_next = r4 - (dfx <<< 1);
      3'sd1:   r_next = r4 - dfx;
      -3'sd1:  r_next = r4 + dfx;
      -3'sd2:  r_next = r4 + (dfx <<< 1);
      default: r_next = r4;
    endcase

    // on-the-fly conversion: qp = Q, qm = Q - 1 (in units of the last digit)
    if (qd > 0) begin
      qp_next = {qp_q[2*ITER-3:0], 2'(qd)};
      qm_next = {qp_q[2*ITER-3:0], 2'(qd - 3'sd1)};
    end else if (qd == 0) begin
      qp_next = {qp_q[2*ITER-3:0], 2'b00};
      qm_next = {qm_q[2*ITER-3:0], 2'b11};
    end else begin
      qp_next = {qm_q[2*ITER-3:0], 2'(qd + 3'sd4)};
      qm_next = {qm_q[2*ITER-3:0], 2'(qd + 3'sd3)};
    end

    r_fix = r_next + dfx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt_q <= ($clog2(ITER+1))'(ITER);
      end else if (busy) begin
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      r_q  <= RW'(x);                // x/4 with F fraction bits is X itself
      d_q  <= d;
      qp_q <= '0;
      qm_q <= '1;
    end else if (busy) begin
      r_q  <= r_next;
      qp_q <= qp_next;
      qm_q <= qm_next;
      if (cnt_q == 1) begin
        // last digit: correct a negative remainder
        quo    <= r_next[RW-1] ? qm_next : qp_next;
        rem_nz <= r_next[RW-1] ? (r_fix != '0) : (r_next != '0);
      end
    end
  end

endmodule
