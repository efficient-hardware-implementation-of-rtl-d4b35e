// tb_hk3x_top: end-to-end testbench of hk3x_top at its default widths.
//
// Drives all four generators of the top with no parameter overrides: the
// two 12-bit ripple generators and the 18-bit prefix generator over every
// operand, the 68-bit look-ahead generator with random operands and operands
// built to make a carry travel the full width. Each result is compared with
// 3X from integer arithmetic. It also counts, per generator, how often each
// mechanism was exercised: a negative operand, a carry started by x_0 (the
// H chain) or by x_1 (the K chain) that reaches the top carry S_N, and a
// result that needs the two bits beyond the operand width. A mechanism never
// exercised counts as a failure.
module tb_hk3x_top;
  import hk3x_ref_pkg::*;

  logic [11:0] x_ripple;
  logic [13:0] s_ripple;
  logic [11:0] x_rca;
  logic [13:0] s_rca;
  logic [67:0] x_cla;
  logic [69:0] s_cla;
  logic [17:0] x_ppa;
  logic [19:0] s_ppa;

  hk3x_top dut (.*);

  int checks   = 0;
  int failures = 0;
  int unsigned ev [4][4];   // [generator][event] counts

  task automatic chk(string name, int unsigned n, word_t x, word_t got);
    word_t exp;
    exp = ref3x(x, n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s N=%0d x=%h got=%h exp=%h", name, n, x, got, exp);
    end
  endtask

  // record which of the design's mechanisms an operand exercises
  task automatic note(int g, int unsigned n, word_t x);
    word_t s;
    s = ref3x(x, n);
    if (x[n-1]) ev[g][0]++;
    if (s[n] != ref3x(x ^ 1, n)[n]) ev[g][1]++;
    if (s[n] != ref3x(x ^ 2, n)[n]) ev[g][2]++;
    if (s[n+1] != s[n] || s[n] != s[n-1]) ev[g][3]++;
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    word_t v;
    x_ripple = '0; x_rca = '0; x_cla = '0; x_ppa = '0;
    for (longint i = 0; i < (longint'(1) << 12); i++) begin
      v = word_t'(i);
      x_ripple = 12'(v);
      #1;
      chk("ripple", 12, v, word_t'(s_ripple));
      note(0, 12, v);
    end
    for (longint i = 0; i < (longint'(1) << 12); i++) begin
      v = word_t'(i);
      x_rca = 12'(v);
      #1;
      chk("rca", 12, v, word_t'(s_rca));
      note(1, 12, v);
    end
    for (int i = 0; i < 100000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(68) : rand_word(68);
      x_cla = 68'(v);
      #1;
      chk("cla", 68, v, word_t'(s_cla));
      note(2, 68, v);
    end
    for (longint i = 0; i < (longint'(1) << 18); i++) begin
      v = word_t'(i);
      x_ppa = 18'(v);
      #1;
      chk("ppa", 18, v, word_t'(s_ppa));
      note(3, 18, v);
    end
    begin
      string gname [4] = '{"ripple", "rca", "cla", "ppa"};
      string ename [4] = '{"negative operand", "carry from x_0 reaches S_N (H chain)", "carry from x_1 reaches S_N (K chain)", "result needs the two extra bits"};
      for (int g = 0; g < 4; g++)
        for (int e = 0; e < 4; e++) begin
          $display("%s: %s x%0d", gname[g], ename[e], ev[g][e]);
          checks++;
          if (ev[g][e] == 0) begin
            failures++;
            $display("FAIL %s never exercised: %s", gname[g], ename[e]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
