// tb_hk_final_add: self-checking testbench of hk_final_add.
//
// Instantiates the block at its default width (68, a multiple of 4) and at
// 18 (4J+2), so both ways of finding H_{N-2} are used. Each gets random
// operands, and operands with long carry chains, with H and K at the group
// positions taken from the bit-serial recurrence; the result must equal 3X
// from integer arithmetic.
module tb_hk_final_add;
  import hk3x_ref_pkg::*;

  logic [67:0] x;
  logic [16:0] h, k;
  logic [69:0] s;
  logic [17:0] xs;
  logic [3:0]  hs, ks;
  logic [19:0] ss;

  hk_final_add dut (.x(x), .h(h), .k(k), .s(s));
  hk_final_add #(.N(18)) dut_18 (.x(xs), .h(hs), .k(ks), .s(ss));

  int checks   = 0;
  int failures = 0;

  task automatic chk(string what, logic [71:0] got, logic [71:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    word_t v, hr, kr, hr18, kr18;
    for (int i = 0; i < 40000; i++) begin
      v = (i % 3 == 0) ? long_chain_word(68) : rand_word(68);
      ref_hk(v, 68, hr, kr);
      ref_hk(v & mask(18), 18, hr18, kr18);
      x  = 68'(v);
      xs = 18'(v);
      for (int j = 0; j < 17; j++) begin
        h[j] = hr[4*j+2];
        k[j] = kr[4*j+2];
      end
      for (int j = 0; j < 4; j++) begin
        hs[j] = hr18[4*j+2];
        ks[j] = kr18[4*j+2];
      end
      #1;
      chk($sformatf("N=68 x=%h", v), 72'(s), ref3x(v, 68));
      chk($sformatf("N=18 x=%h", v & mask(18)), 72'(ss), ref3x(v & mask(18), 18));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
