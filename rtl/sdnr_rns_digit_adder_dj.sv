// sdnr_rns_digit_adder_dj -- simplified SDNR/RNS digit adder for digit sets
// that are disjoint in RNS (n = P1*P2 >= 4A+1).
//
// When the moduli product covers the whole range -2A..2A of the intermediate
// sum, every code of <sp1, sp2> names exactly one sum, the ambiguous region
// disappears and the argument sign detectors are not needed: the transfer
// digit comes from the decoded intermediate sum alone (C = +1 if S > T,
// -1 if S < -T). The rest is as in the unified adder: correction by -R*C,
// then addition of the incoming transfer digit. Combinational.
// Defaults: radix 10 with the minimally redundant set {-6..6}, moduli 4 and 7
// (28 >= 25), T = 5 -- a configuration chosen for this design. Removing the
// sign detectors under n >= 4A+1 is the simplification the adder family
// allows; the inner circuits are this design's own. A names the digit set
// the parameters are valid for; an elaboration check rejects P1*P2 < 4A+1.
module sdnr_rns_digit_adder_dj #(
  parameter int unsigned R  = 10,
  parameter int unsigned A  = 6,
  parameter int unsigned T  = 5,
  parameter int unsigned P1 = 4,
  parameter int unsigned P2 = 7
) (
  input  logic [$clog2(P1)-1:0] xp1,
  input  logic [$clog2(P2)-1:0] xp2,
  input  logic [$clog2(P1)-1:0] yp1,
  input  logic [$clog2(P2)-1:0] yp2,
  input  sdnr_rns_pkg::carry_t  c_in,
  output sdnr_rns_pkg::carry_t  c_out,
  output logic [$clog2(P1)-1:0] sum1,
  output logic [$clog2(P2)-1:0] sum2
);
  import sdnr_rns_pkg::*;

  localparam int unsigned W1 = $clog2(P1);
  localparam int unsigned W2 = $clog2(P2);
  localparam int unsigned DW = $clog2(P1 * P2) + 1;
  localparam logic [W1-1:0] MR1 = W1'(mod_p(-int'(R), int'(P1)));
  localparam logic [W2-1:0] MR2 = W2'(mod_p(-int'(R), int'(P2)));
  localparam logic [W1-1:0] PR1 = W1'(mod_p(int'(R), int'(P1)));
  localparam logic [W2-1:0] PR2 = W2'(mod_p(int'(R), int'(P2)));

  logic [W1-1:0] sp1, cor1, spc1, ci1;
  logic [W2-1:0] sp2, cor2, spc2, ci2;
  logic signed [DW-1:0] s;

  rns_mod_adder #(.P(P1)) u_add1 (.a(xp1), .b(yp1), .s(sp1));
  rns_mod_adder #(.P(P2)) u_add2 (.a(xp2), .b(yp2), .s(sp2));

  // magnitude test on the non-corrected sum alone
  rns_digit_decode #(.P1(P1), .P2(P2), .DW(DW)) u_dec (.r1(sp1), .r2(sp2), .d(s));
  always_comb begin
    if (s > DW'(int'(T)))        c_out = C_POS;
    else if (s < -DW'(int'(T)))  c_out = C_NEG;
    else                         c_out = C_ZERO;
  end

  always_comb begin
    unique case (c_out)
      C_POS:   begin cor1 = MR1; cor2 = MR2; end
      C_NEG:   begin cor1 = PR1; cor2 = PR2; end
      default: begin cor1 = '0;  cor2 = '0;  end
    endcase
  end
  rns_mod_adder #(.P(P1)) u_cor1 (.a(sp1), .b(cor1), .s(spc1));
  rns_mod_adder #(.P(P2)) u_cor2 (.a(sp2), .b(cor2), .s(spc2));

  rns_digit_encode #(.P1(P1), .P2(P2), .DW(2)) u_cin (.d(c_in), .r1(ci1), .r2(ci2));
  rns_mod_adder #(.P(P1)) u_fin1 (.a(spc1), .b(ci1), .s(sum1));
  rns_mod_adder #(.P(P2)) u_fin2 (.a(spc2), .b(ci2), .s(sum2));

  // The parameters must describe a digit set the moduli can hold.
  if (P1 * P2 < 4 * A + 1) begin : g_bad_digit_set
    $error("moduli product must be at least 4A+1 for the simplified adder");
  end
endmodule
