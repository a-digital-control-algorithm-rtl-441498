// seq_sqrt - iterative integer square root, one root bit per clock
//
// Used for the square root of the d1 formula. The radicand is 2W bits wide
// and the root W bits; the digit-by-digit method brings down two radicand
// bits per clock and decides one root bit by a trial subtraction, so the
// result is floor(sqrt(radicand)). The method is this design's choice; the
// reference design only needs the root.
//
// Interface: pulse `start` with `radicand` valid; `done` pulses W+1 clocks
// later with `root`, held until the next start. `busy` is high in between.
module seq_sqrt #(
  parameter int unsigned W = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] radicand,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   root
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [2*W-1:0] rad_q;
  logic [W+2:0]   rem_q;
  logic [CW-1:0]  bit_q;

  logic [W+2:0] shifted, trial;
  logic         fits;
  always_comb begin
    shifted = {rem_q[W:0], rad_q[2*W-1 -: 2]};
    trial   = {1'b0, root, 2'b01};
    fits    = (shifted >= trial);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rad_q <= '0;
      rem_q <= '0;
      bit_q <= '0;
      root  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        rad_q <= radicand;
        rem_q <= '0;
        root  <= '0;
        bit_q <= CW'(W);
      end else if (busy) begin
        rem_q <= fits ? (shifted - trial) : shifted;
        root  <= {root[W-2:0], fits};
        rad_q <= {rad_q[2*W-3:0], 2'b00};
        bit_q <= bit_q - 1'b1;
        if (bit_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
