// seq_divider - iterative unsigned restoring divider, one quotient bit per clock
//
// The duty prediction needs 1/v_in1 (for D_new = v_o'/v_in1, for the sum
// k = d1 + d2 and for the 4L/(v_in1 Ts) factor of the d1 formula). One
// reciprocal is computed per prediction and reused, so a small sequential
// divider is enough: the prediction has 0.3 Ts = 75 clocks before the new
// duty must be applied. The algorithm (shift-subtract, restoring) is this
// design's choice; the reference design only needs the quotient.
//
// Interface: pulse `start` with `num`/`den` valid; `done` pulses W+1 clocks
// later with `quot` = floor(num/den) and `rem` = num mod den, both held until
// the next start. den = 0 gives an all-ones quotient. `busy` is high between.
module seq_divider #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot,
  output logic [W-1:0] rem
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  num_q, den_q;
  logic [W:0]    rem_q;
  logic [CW-1:0] bit_q;

  // one restoring step: bring down the next dividend bit, try to subtract
  logic [W:0] shifted, diff;
  logic       fits;
  always_comb begin
    shifted = {rem_q[W-1:0], num_q[W-1]};
    diff    = shifted - {1'b0, den_q};
    fits    = (shifted >= {1'b0, den_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      num_q <= '0;
      den_q <= '0;
      rem_q <= '0;
      bit_q <= '0;
      quot  <= '0;
      rem   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        num_q <= num;
        den_q <= den;
        rem_q <= '0;
        bit_q <= CW'(W);
        quot  <= '0;
      end else if (busy) begin
        rem_q <= fits ? diff : shifted;
        quot  <= {quot[W-2:0], fits};
        num_q <= {num_q[W-2:0], 1'b0};
        bit_q <= bit_q - 1'b1;
        if (bit_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          rem  <= W'(fits ? diff : shifted);
        end
      end
    end
  end

endmodule
