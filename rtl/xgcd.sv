// xgcd: modular inverse processor based on the extended Euclidean algorithm.
//
// Given an integer a (port A) and a modulus m (port B) it returns s with
// a*s = 1 (mod m), 0 <= s < m. It runs the quotient form of the extended
// Euclidean algorithm:
//
//   s = 0; s1 = 1; r = m; r1 = a;
//   while (r1 != 0) { q = r div r1;
//                     (s, s1) = (s1, s - q*s1);
//                     (r, r1) = (r1, r - q*r1); }
//   if (r > 1) a is not invertible;  if (s < 0) s = s + m;
//
// The interface (A, B, Results as (N:0) buses; Clk, Enable, Reset, Ack,
// Ready) and the names of the eight controller states follow the published
// top view and state diagram. The work done in each state, the order of the
// states, the sequential divider and the handshake are this design's own.
//
// Datapath: r, r1 are unsigned (N+1)-bit registers; s, s1 are signed
// (N+2)-bit registers, enough for |s| <= m. The product q*s1 may overflow
// N+2 bits, but it only enters s - q*s1, whose true value does fit, so the
// wrap-around difference is exact. r - q*r1 is taken directly from the
// divider's remainder. The divider (xgcd_divider) is shared by all
// iterations.
//
// Controller, one loop iteration per pass through div .. set1:
//   set_reset  idle; on Enable load s=0, s1=1, r=B, r1=A, pulse Ack
//   div        start the division r / r1
//   modular    wait (self-loop) until quotient and remainder are ready
//   mult       p = q * s1
//   reset1     (s, s1) <= (s1, s - p); (r, r1) <= (r1, r mod r1)
//   set1       r1 != 0 ? back to div : go to sign_test
//   sign_test  Results = (r != 1) ? 0 : (s < 0 ? s + m : s)
//   output     Ready high; stay while Enable is high, then back to set_reset
// An operand a = 0 skips the loop.
//
// Timing: Ack is high for the one cycle after the clock edge that accepts
// Enable. With k loop iterations, Ready rises k*(N+6)+1 clock edges after
// that edge (each iteration: 1 div + N+2 modular + mult + reset1 + set1).
// Results is registered and stays valid while Ready is high and after it,
// until the next operation finishes. Reset is synchronous, active high.
//
// Non-invertible inputs (gcd(a, m) != 1) return 0, which is never the
// inverse of anything for m >= 2. m = 1 returns 0; m = 0 is meaningless and
// returns an unspecified value, but the operation still completes.
module xgcd
  import xgcd_pkg::*;
#(
  parameter int unsigned N = 32  // precision; buses are N+1 bits wide, (N:0)
) (
  input  logic       Clk,
  input  logic       Reset,
  input  logic       Enable,
  input  logic [N:0] A,
  input  logic [N:0] B,
  output logic [N:0] Results,
  output logic       Ack,
  output logic       Ready
);

  localparam int unsigned W  = N + 1;  // width of a, m, r, r1, quotient
  localparam int unsigned SW = N + 2;  // width of the signed coefficients

  xgcd_state_e state_q;

  logic [W-1:0]         m_q, r_q, r1_q, quo_q, rem_q;
  logic signed [SW-1:0] s_q, s1_q, prod_q;

  // Divider interface.
  logic         div_start, div_busy, div_done;
  logic [W-1:0] div_quo, div_rem;

  assign div_start = (state_q == ST_DIV);

  xgcd_divider #(.W(W)) u_divider (
    .clk      (Clk),
    .rst      (Reset),
    .start    (div_start),
    .dividend (r_q),
    .divisor  (r1_q),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_quo),
    .remainder(div_rem)
  );

  // Final correction: add m to a negative coefficient.
  logic signed [SW-1:0] s_fixed;
  always_comb begin
    s_fixed = s_q;
    if (s_q < 0) s_fixed = s_q + $signed({1'b0, m_q});
  end

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state_q <= ST_SET_RESET;
      m_q     <= '0;
      r_q     <= '0;
      r1_q    <= '0;
      s_q     <= '0;
      s1_q    <= '0;
      quo_q   <= '0;
      rem_q   <= '0;
      prod_q  <= '0;
      Results <= '0;
      Ack     <= 1'b0;
      Ready   <= 1'b0;
    end else begin
      Ack <= 1'b0;
      unique case (state_q)
        ST_SET_RESET: begin
          if (Enable) begin
            m_q     <= B;
            r_q     <= B;
            r1_q    <= A;
            s_q     <= '0;
            s1_q    <= SW'(1);
            Ack     <= 1'b1;
            state_q <= (A != '0) ? ST_DIV : ST_SIGN_TEST;
          end
        end
        ST_DIV: state_q <= ST_MODULAR;
        ST_MODULAR: begin
          if (div_done) begin
            quo_q   <= div_quo;
            rem_q   <= div_rem;
            state_q <= ST_MULT;
          end
        end
        ST_MULT: begin
          prod_q  <= SW'($signed({1'b0, quo_q}) * s1_q);
          state_q <= ST_RESET1;
        end
        ST_RESET1: begin
          s_q     <= s1_q;
          s1_q    <= s_q - prod_q;
          r_q     <= r1_q;
          r1_q    <= rem_q;
          state_q <= ST_SET1;
        end
        ST_SET1: state_q <= (r1_q != '0) ? ST_DIV : ST_SIGN_TEST;
        ST_SIGN_TEST: begin
          Results <= (r_q != W'(1)) ? '0 : W'(s_fixed);
          Ready   <= 1'b1;
          state_q <= ST_OUTPUT;
        end
        ST_OUTPUT: begin
          if (!Enable) begin
            Ready   <= 1'b0;
            state_q <= ST_SET_RESET;
          end
        end
        default: state_q <= ST_SET_RESET;
      endcase
    end
  end

  // Handshake rules.
  a_ready_only_in_output: assert property (@(posedge Clk) disable iff (Reset)
      Ready == (state_q == ST_OUTPUT))
    else $error("xgcd: Ready outside the output state");
  a_ack_one_cycle: assert property (@(posedge Clk) disable iff (Reset) Ack |=> !Ack)
    else $error("xgcd: Ack longer than one cycle");
  a_no_div_by_zero: assert property (@(posedge Clk) disable iff (Reset)
      div_start |-> r1_q != '0)
    else $error("xgcd: division by zero requested");
  a_divider_active: assert property (@(posedge Clk) disable iff (Reset)
      state_q == ST_MODULAR |-> div_busy || div_done)
    else $error("xgcd: waiting for an idle divider");
  a_result_in_range: assert property (@(posedge Clk) disable iff (Reset)
      state_q == ST_SIGN_TEST && r_q == W'(1) |-> !s_fixed[SW-1])
    else $error("xgcd: corrected coefficient still negative");

endmodule
