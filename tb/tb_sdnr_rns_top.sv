// tb_sdnr_rns_top -- end-to-end test of the arithmetic unit at its default
// parameters (radix 53, 5 digits, moduli 7 and 8; radix-10 disjoint-set
// adder of 8 digits; radix-4 adder of 8 digits).
// Each cycle random operands are applied with in_valid mostly high; one cycle
// later the registered results must match the reference: value of X +/- Y,
// decoded digits, result sign/zero, X-versus-Y comparison, the radix-10 sum
// and the radix-4 sum. out_valid must follow in_valid after exactly one cycle
// and results must hold while in_valid is low. Counts every mechanism
// (carry +1/-1, sign-resolved sums, subtraction, lt/eq/gt, idle cycles,
// radix-10 carries, radix-4 top-digit carries) and fails if one never occurs.
module tb_sdnr_rns_top;
  import tb_sdnr_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int D = 5, DJ = 8, Q = 8;

  logic rst_n, in_valid, sub, out_valid;
  logic [D-1:0][2:0] x1, x2, y1, y2;
  logic [D:0][2:0] s1, s2;
  logic [D:0][6:0] s_dig;
  logic res_neg, res_zero, lt, eq, gt;
  logic [D-1:0] carry_pos, carry_neg, ambiguous;
  logic [DJ-1:0][1:0] dx1, dy1;
  logic [DJ-1:0][2:0] dx2, dy2;
  logic [DJ:0][1:0] ds1;
  logic [DJ:0][2:0] ds2;
  logic [DJ-1:0] dcarry_pos, dcarry_neg;
  logic [Q-1:0][2:0] qx, qy;
  logic [Q:0][2:0] qs;

  sdnr_rns_top dut (.*);

  // expected results of the operation in flight
  longint e_val, e_dval, e_qval, e_x, e_y;
  bit     e_valid;
  int n_pos, n_neg, n_amb, n_sub, n_lt, n_eq, n_gt, n_idle, n_dpos, n_dneg, n_qtop;

  function automatic logic [2:0] enc4(input int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic apply(input int k);
    longint xv, yv, dxv, dyv, qxv, qyv;
    in_valid = (k % 9 != 4);
    sub = ($urandom_range(1, 0) == 1);
    xv = 0; yv = 0; dxv = 0; dyv = 0; qxv = 0; qyv = 0;
    for (int i = D - 1; i >= 0; i--) begin
      int a, b;
      a = (k % 6 == 0) ? 27 : rnd_digit(27);
      b = (k % 6 == 0) ? 27 : (k % 6 == 1) ? -27 : rnd_digit(27);
      if (k % 10 == 3) b = a;
      xv = xv * 53 + longint'(a); yv = yv * 53 + longint'(b);
      x1[i] = 3'(rmod(a, 7)); x2[i] = 3'(rmod(a, 8));
      y1[i] = 3'(rmod(b, 7)); y2[i] = 3'(rmod(b, 8));
    end
    for (int i = DJ - 1; i >= 0; i--) begin
      int a, b;
      a = rnd_digit(6); b = rnd_digit(6);
      dxv = dxv * 10 + longint'(a); dyv = dyv * 10 + longint'(b);
      dx1[i] = 2'(rmod(a, 4)); dx2[i] = 3'(rmod(a, 7));
      dy1[i] = 2'(rmod(b, 4)); dy2[i] = 3'(rmod(b, 7));
    end
    for (int i = Q - 1; i >= 0; i--) begin
      int a, b;
      a = rnd_digit(3); b = rnd_digit(3);
      qxv = qxv * 4 + longint'(a); qyv = qyv * 4 + longint'(b);
      qx[i] = enc4(a); qy[i] = enc4(b);
    end
    if (in_valid) begin
      e_val  = sub ? xv - yv : xv + yv;
      e_dval = sub ? dxv - dyv : dxv + dyv;
      e_qval = qxv + qyv;
      e_x = xv; e_y = yv;
      n_sub += sub;
    end else n_idle++;
    e_valid = in_valid;
  endtask

  task automatic check_out();
    longint v, vd, dv, qv;
    checks++;
    if (out_valid != e_valid) fail($sformatf("out_valid=%0b expected %0b", out_valid, e_valid));
    // results are those of the last valid operation (held over idle cycles)
    v = 0; vd = 0;
    for (int i = D; i >= 0; i--) begin
      int d;
      d = rdec(int'(s1[i]), int'(s2[i]), 7, 8);
      if (d < -27 || d > 27) fail($sformatf("digit %0d out of range: %0d", i, d));
      v  = v * 53 + longint'(d);
      vd = vd * 53 + longint'($signed(s_dig[i]));
    end
    checks += 4;
    if (v != e_val)  fail($sformatf("radix-53 result %0d expected %0d", v, e_val));
    if (vd != e_val) fail($sformatf("decoded digits give %0d expected %0d", vd, e_val));
    if (res_neg != (e_val < 0) || res_zero != (e_val == 0))
      fail($sformatf("result sign neg=%0b zero=%0b for %0d", res_neg, res_zero, e_val));
    if (lt != (e_x < e_y) || eq != (e_x == e_y) || gt != (e_x > e_y))
      fail($sformatf("compare %0d vs %0d: lt=%0b eq=%0b gt=%0b", e_x, e_y, lt, eq, gt));
    dv = 0;
    for (int i = DJ; i >= 0; i--) begin
      int d;
      d = rdec(int'(ds1[i]), int'(ds2[i]), 4, 7);
      if (d < -6 || d > 6) fail($sformatf("radix-10 digit %0d out of range: %0d", i, d));
      dv = dv * 10 + longint'(d);
    end
    qv = 0;
    for (int i = Q; i >= 0; i--) qv = qv * 4 + (qs[i][2] ? -longint'(qs[i][1:0]) : longint'(qs[i][1:0]));
    checks += 2;
    if (dv != e_dval) fail($sformatf("radix-10 result %0d expected %0d", dv, e_dval));
    if (qv != e_qval) fail($sformatf("radix-4 result %0d expected %0d", qv, e_qval));
    if (out_valid) begin
      n_pos += $countones(carry_pos); n_neg += $countones(carry_neg); n_amb += $countones(ambiguous);
      n_lt += lt; n_eq += eq; n_gt += gt;
      n_dpos += $countones(dcarry_pos); n_dneg += $countones(dcarry_neg);
      n_qtop += (qs[Q] != 3'b000);
    end
  endtask

  initial begin
    int ops;
    n_pos = 0; n_neg = 0; n_amb = 0; n_sub = 0; n_lt = 0; n_eq = 0; n_gt = 0;
    n_idle = 0; n_dpos = 0; n_dneg = 0; n_qtop = 0;
    rst_n = 0; in_valid = 0; sub = 0;
    x1 = '0; x2 = '0; y1 = '0; y2 = '0; dx1 = '0; dx2 = '0; dy1 = '0; dy2 = '0; qx = '0; qy = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid !== 1'b0 || s1 != '0) fail("reset state");
    @(negedge clk) rst_n = 1;
    // first operation must be valid so there is a result to hold
    @(negedge clk);
    apply(0);
    in_valid = 1;
    e_valid = 1;
    ops = 3000;
    for (int k = 1; k <= ops; k++) begin
      longint hold_val, hold_dval, hold_qval, hold_x, hold_y;
      @(posedge clk);
      #1;
      check_out();
      hold_val = e_val; hold_dval = e_dval; hold_qval = e_qval; hold_x = e_x; hold_y = e_y;
      @(negedge clk);
      apply(k);
      if (!e_valid) begin
        e_val = hold_val; e_dval = hold_dval; e_qval = hold_qval; e_x = hold_x; e_y = hold_y;
      end
    end
    @(posedge clk);
    #1;
    check_out();
    $display("carry +1 %0d, carry -1 %0d, sign-resolved %0d, subtract %0d, lt %0d eq %0d gt %0d, idle %0d, r10 carry +1 %0d -1 %0d, r4 top carry %0d",
             n_pos, n_neg, n_amb, n_sub, n_lt, n_eq, n_gt, n_idle, n_dpos, n_dneg, n_qtop);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_amb == 0 || n_sub == 0 || n_lt == 0 || n_eq == 0 || n_gt == 0 ||
        n_idle == 0 || n_dpos == 0 || n_dneg == 0 || n_qtop == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
