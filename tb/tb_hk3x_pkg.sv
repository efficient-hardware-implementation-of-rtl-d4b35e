// tb_hk3x_pkg: self-checking testbench of the hk3x_pkg span operators.
//
// Applies hk_op_h and hk_op_k to all 16 pairs of (g, p) spans and compares
// them with the operator definitions written out bit by bit; checks both
// operators for associativity over all 64 triples, which the prefix tree
// relies on; and checks that folding the group pairs of a real operand
// (gh_j = x_{4j+2} + x_{4j+1} x_{4j}, ph_j = x_{4j+1} x_{4j-1}, and the K
// duals) from group 0 with each operator reproduces H_{4j+2} and K_{4j+2}
// of the bit-serial recurrence, with ph_0 = 0 and pk_0 = 1. Each case is
// evaluated one time unit apart; a watchdog ends a hung run as a failure.
module tb_hk3x_pkg;
  import hk3x_pkg::*;
  import hk3x_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  task automatic chk(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    hk_gp_t a, b, c, r;
    word_t  v, h, k;
    hk_gp_t acc_h, acc_k, gh, gk;
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      r = hk_op_h(a, b);
      chk($sformatf("op_h %b %b", a, b), r, {a.g | (a.p & b.g), a.p & b.p});
      r = hk_op_k(a, b);
      chk($sformatf("op_k %b %b", a, b), r, {a.g & (a.p | b.g), a.p | b.p});
    end
    for (int i = 0; i < 64; i++) begin
      {a, b, c} = 6'(i);
      #1;
      chk($sformatf("assoc_h %b %b %b", a, b, c),
          hk_op_h(hk_op_h(a, b), c), hk_op_h(a, hk_op_h(b, c)));
      chk($sformatf("assoc_k %b %b %b", a, b, c),
          hk_op_k(hk_op_k(a, b), c), hk_op_k(a, hk_op_k(b, c)));
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 3 == 0) ? long_chain_word(68) : rand_word(68);
      ref_hk(v, 68, h, k);
      #1;
      acc_h = {v[2] | (v[1] & v[0]), 1'b0};
      acc_k = {v[2] & v[1], 1'b1};
      for (int j = 1; j < 17; j++) begin
        gh = {v[4*j+2] | (v[4*j+1] & v[4*j]), v[4*j+1] & v[4*j-1]};
        gk = {v[4*j+2] & (v[4*j+1] | v[4*j]), v[4*j+1] | v[4*j-1]};
        acc_h = hk_op_h(gh, acc_h);
        acc_k = hk_op_k(gk, acc_k);
        chk($sformatf("H%0d x=%h", 4*j+2, v), {acc_h.g, acc_k.g}, {h[4*j+2], k[4*j+2]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
