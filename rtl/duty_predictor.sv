// duty_predictor - two-switching-cycle duty prediction from capacitor charge balance
//
// From one set of samples taken at point 1 (input voltage v_in1, inductor
// current sample, output voltage v_o1) and the load current i_o estimated
// before the transient, it computes the duty cycles d1 and d2 of the two
// switching cycles that bring the inductor current to its new valley value
// i_L_end and return the capacitor charge to zero at the end of the second
// cycle, plus the new steady-state duty D_new and current reference i_Lnew:
//
//   v_o'    = Vref + i_o r_loss
//   D_new   = v_o' / v_in1
//   i_L_end = i_o - 1/2 (Ts/L) v_o' (1 - D_new)
//   k       = ((i_L_end - i_L1) L/Ts + 2 v_o') / v_in1             (= d1 + d2)
//   Q0/Ts   = (C/Ts) (v_o1 - (i_L1 - i_o) ESR - Vref)
//   X       = (1+k)^2 + 4 L/(v_in1 Ts) (i_L1 - 2 i_o + i_L_end
//                                       - 1/2 k^2 v_in1 Ts/L + Q0/Ts)
//   d1      = ((1+k) - sqrt(X)) / 2,   d2 = k - d1
//   i_Lnew  = i_L_end + 0.3 v_o' Ts/L
//
// These equations follow the reference algorithm. The current sample is
// taken 0.3 Ts before the switch turns on; the current at point 1 is
// projected from it with the duty d_prev of the sampled cycle:
//   i_L1 = sample + (Ts/L) (v_in1 max(0, d_prev - 0.7) - 0.3 v_o')
// For d_prev <= 0.7 the switch is off over that window and this is the
// falling-slope term 0.3 v_o' Ts/L the reference uses for i_Lnew; the
// rising-slope part for longer duties (e.g. after a clamped 100 % cycle) is
// this design's addition. When X < 0 no
// two-cycle solution exists; the root is then taken as 0, `no_solution` is
// set and the resulting d1 falls outside [0,1], which the sequencer clamps.
//
// Implementation: a sequence of single-clock fixed-point steps (Q15.16, at
// most two multiplies each), one shared reciprocal 1/v_in1 from seq_divider
// and one seq_sqrt. v_in1 below VIN_MIN_V is raised to it before dividing.
// Timing: `done` pulses 66 clocks after `start` (W_DIV = 33, W_SQRT = 24),
// inside the 0.3 Ts = 75 clocks between sampling and the next turn-on at
// 100 MHz / 400 kHz. Outputs hold until the next `done`.
module duty_predictor
  import dcdc_pkg::*;
#(
  parameter real L_H        = dcdc_pkg::DEF_L_H,
  parameter real C_F        = dcdc_pkg::DEF_C_F,
  parameter real FS_HZ      = dcdc_pkg::DEF_FS_HZ,
  parameter real VREF_V     = dcdc_pkg::DEF_VREF_V,
  parameter real ESR_OHM    = dcdc_pkg::DEF_ESR_OHM,
  parameter real RLOSS_OHM  = dcdc_pkg::DEF_RLOSS_OHM,
  parameter real SAMPLE_ADV = dcdc_pkg::DEF_SAMPLE_ADV,
  parameter real VIN_MIN_V  = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t vin1,    // input voltage at point 1 [V]
  input  fix_t il_smp,  // inductor current sample, 0.3 Ts before point 1 [A]
  input  fix_t vo1,     // output voltage at point 1 [V]
  input  fix_t io,      // load current estimate [A]
  input  fix_t d_prev,  // duty applied in the sampled cycle
  output logic busy,
  output logic done,
  output fix_t d1,
  output fix_t d2,
  output fix_t d_new,
  output fix_t il_new,
  output logic no_solution
);

  localparam real TS_S = 1.0 / FS_HZ;
  localparam fix_t VREF      = to_fix(VREF_V);
  localparam fix_t RLOSS     = to_fix(RLOSS_OHM);
  localparam fix_t ESR       = to_fix(ESR_OHM);
  localparam fix_t C_TS      = to_fix(C_F / TS_S);             // C/Ts   [A/V]
  localparam fix_t L_TS      = to_fix(L_H / TS_S);             // L/Ts   [V/A]
  localparam fix_t FOUR_L_TS = to_fix(4.0 * L_H / TS_S);
  localparam fix_t HALF_TSL  = to_fix(0.5 * TS_S / L_H);       // Ts/(2L)
  localparam fix_t ADV_TSL   = to_fix(SAMPLE_ADV * TS_S / L_H);
  localparam fix_t TSL       = to_fix(TS_S / L_H);
  localparam fix_t ON_EDGE   = to_fix(1.0 - SAMPLE_ADV);
  localparam fix_t VIN_MIN   = to_fix(VIN_MIN_V);

  localparam int unsigned W_DIV  = 33;
  localparam int unsigned W_SQRT = 24;

  typedef enum logic [3:0] {
    S_IDLE, S_VOP, S_RISE, S_IL1, S_Q0, S_WDIV, S_DNEW, S_ILEND, S_K, S_TERM,
    S_X, S_SQ, S_WSQ
  } state_t;
  state_t state;

  fix_t vin_q, ils_q, vo_q, io_q, dp_q, rise;
  fix_t vop, il1, q0s, recip, ilend, k, kp1, term, coef, x;

  // ---- reciprocal 1/v_in1 in Q16: 2^32 / v_in1 ----
  logic             div_start, div_busy, div_done;
  logic [W_DIV-1:0] div_quot, div_rem;
  fix_t             vin_clip;
  assign vin_clip = (vin1 < VIN_MIN) ? VIN_MIN : vin1;

  seq_divider #(.W(W_DIV)) u_div (
    .clk, .rst_n,
    .start (div_start),
    .num   (W_DIV'(64'h1_0000_0000)),
    .den   (W_DIV'(unsigned'(vin_clip))),
    .busy  (div_busy),
    .done  (div_done),
    .quot  (div_quot),
    .rem   (div_rem)
  );
  assign div_start = start && (state == S_IDLE);

  // ---- square root of X: sqrt(X * 2^16) * 2^8 = sqrt(X) in Q16 ----
  logic              sq_start, sq_busy, sq_done;
  logic [W_SQRT-1:0] sq_root;
  logic [2*W_SQRT-1:0] sq_rad;
  assign sq_rad   = (x < 0) ? '0 : {x[2*W_SQRT-FRAC-1:0], {FRAC{1'b0}}};
  assign sq_start = (state == S_SQ);

  seq_sqrt #(.W(W_SQRT)) u_sqrt (
    .clk, .rst_n,
    .start    (sq_start),
    .radicand (sq_rad),
    .busy     (sq_busy),
    .done     (sq_done),
    .root     (sq_root)
  );

  fix_t d1_new;
  assign d1_new = (kp1 - fix_t'({8'b0, sq_root})) >>> 1;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      {vin_q, ils_q, vo_q, io_q, dp_q, rise} <= '0;
      {vop, il1, q0s, recip, ilend, k, kp1, term, coef, x} <= '0;
      {d1, d2, d_new, il_new} <= '0;
      no_solution <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          vin_q <= vin_clip;
          ils_q <= il_smp;
          vo_q  <= vo1;
          io_q  <= io;
          dp_q  <= (d_prev > ON_EDGE) ? d_prev - ON_EDGE : '0;
          state <= S_VOP;
        end
        S_VOP: begin                         // v_o' = Vref + i_o r_loss
          vop   <= VREF + fmul(io_q, RLOSS);
          state <= S_RISE;
        end
        S_RISE: begin                        // rise while S1 is still on
          rise  <= fmul(TSL, fmul(vin_q, dp_q));
          state <= S_IL1;
        end
        S_IL1: begin                         // current at the turn-on instant
          il1   <= ils_q + rise - fmul(ADV_TSL, vop);
          state <= S_Q0;
        end
        S_Q0: begin                          // capacitor charge at point 1, / Ts
          q0s   <= fmul(C_TS, vo_q - fmul(il1 - io_q, ESR) - VREF);
          state <= S_WDIV;
        end
        S_WDIV: if (div_done) begin
          recip <= fix_t'(div_quot[31:0]);
          state <= S_DNEW;
        end
        S_DNEW: begin                        // D_new = v_o' / v_in1
          d_new <= fmul(vop, recip);
          state <= S_ILEND;
        end
        S_ILEND: begin                       // new valley current
          ilend <= io_q - fmul(fmul(HALF_TSL, vop), FIX_ONE - d_new);
          state <= S_K;
        end
        S_K: begin                           // k = d1 + d2
          k     <= fmul(fmul(ilend - il1, L_TS) + (vop <<< 1), recip);
          state <= S_TERM;
        end
        S_TERM: begin
          kp1   <= FIX_ONE + k;
          coef  <= fmul(FOUR_L_TS, recip);
          term  <= il1 - (io_q <<< 1) + ilend
                   - fmul(fmul(k, k), fmul(vin_q, HALF_TSL)) + q0s;
          state <= S_X;
        end
        S_X: begin
          x     <= fmul(kp1, kp1) + fmul(coef, term);
          state <= S_SQ;
        end
        S_SQ: state <= S_WSQ;
        S_WSQ: if (sq_done) begin
          d1          <= d1_new;
          d2          <= k - d1_new;
          il_new      <= ilend + fmul(ADV_TSL, vop);
          no_solution <= (x < 0);
          done        <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
