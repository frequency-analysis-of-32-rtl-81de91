// xgcd_divider: sequential unsigned divider producing quotient and remainder.
//
// This is the division step of the extended Euclidean loop: for the current
// pair (r, r1) it yields quotient = r div r1 and remainder = r mod r1, which
// equals r - quotient*r1, the next value of r1 in the algorithm.
//
// Method: restoring shift-and-subtract division, one quotient bit per clock,
// most significant bit first. The dividend is shifted into a W-bit partial
// remainder; whenever the shifted partial remainder is at least the divisor,
// the divisor is subtracted and a 1 enters the quotient.
//
// Interface and timing: a 'start' pulse while not busy loads dividend and
// divisor. 'busy' is then high for exactly W cycles; in the cycle after the
// last one 'done' is high for one cycle and 'quotient'/'remainder' are valid.
// They stay valid until the next start. The divisor must be non-zero (the
// Euclidean loop never divides by zero); a zero divisor gives quotient all
// ones and remainder = dividend. Reset is synchronous and active high.
//
// The document states only that a quotient is computed; the restoring
// sequential structure and the handshake are this design's choice.
module xgcd_divider #(
  parameter int unsigned W = 33  // operand width, the (32:0) buses of the processor
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  div_q;  // divisor
  logic [W-1:0]  quo_q;  // dividend bits shifting out, quotient bits shifting in
  logic [W-1:0]  rem_q;  // partial remainder, always below the divisor
  logic [CW-1:0] cnt_q;  // quotient bits still to produce

  // One step of the restoring division.
  logic [W:0]   shifted;
  logic         fits;
  logic [W-1:0] reduced;

  always_comb begin
    shifted = {rem_q, quo_q[W-1]};
    fits    = shifted >= {1'b0, div_q};
    reduced = W'(shifted - {1'b0, div_q});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q <= '0;
      quo_q <= '0;
      rem_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          div_q <= divisor;
          quo_q <= dividend;
          rem_q <= '0;
          cnt_q <= CW'(W);
          busy  <= 1'b1;
        end
      end else begin
        rem_q <= fits ? reduced : shifted[W-1:0];
        quo_q <= {quo_q[W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q;

  // A new division may only be requested once the previous one has finished.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) !(start && busy))
    else $error("xgcd_divider: start while busy");

endmodule
