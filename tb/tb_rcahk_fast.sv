// tb_rcahk_fast: self-checking testbench of rcahk_fast, the two-bit-per-stage ripple generator.
//
// Instantiates the block at its default width (12) and at 8, 16, 64,
// and compares every result with 3X from integer arithmetic on the
// sign-extended operand (hk3x_ref_pkg::ref3x). Widths up to 18 bits are
// checked exhaustively; wider ones with random operands plus operands that
// make a carry run from the bottom bits to the top. The block is
// combinational: each operand is applied, one time unit allowed to settle,
// and the result sampled. A watchdog ends the run as a failure if it hangs.
module tb_rcahk_fast;
  import hk3x_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int long_hits = 0;   // operands whose top carry depends on x_0 or x_1

  logic [11:0] x_dut;
  logic [13:0] s_dut;
  rcahk_fast dut (.x(x_dut), .s(s_dut));

  logic [7:0] x_dut_8;
  logic [9:0] s_dut_8;
  rcahk_fast #(.N(8)) dut_8 (.x(x_dut_8), .s(s_dut_8));

  logic [15:0] x_dut_16;
  logic [17:0] s_dut_16;
  rcahk_fast #(.N(16)) dut_16 (.x(x_dut_16), .s(s_dut_16));

  logic [63:0] x_dut_64;
  logic [65:0] s_dut_64;
  rcahk_fast #(.N(64)) dut_64 (.x(x_dut_64), .s(s_dut_64));

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

  // is the top carry S_N of 3X sensitive to x_0 or x_1?
  function automatic bit long_chain(word_t x, int unsigned n);
    return (ref3x(x, n)[n] != ref3x(x ^ 1, n)[n]) ||
           (ref3x(x, n)[n] != ref3x(x ^ 2, n)[n]);
  endfunction

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    word_t v;

    for (longint i = 0; i < (longint'(1) << 12); i++) begin
      v = word_t'(i);
      x_dut = 12'(v);
      #1;
      chk("dut", 12, v, word_t'(s_dut));
      if (long_chain(v, 12)) long_hits++;
    end
    for (longint i = 0; i < (longint'(1) << 8); i++) begin
      v = word_t'(i);
      x_dut_8 = 8'(v);
      #1;
      chk("dut_8", 8, v, word_t'(s_dut_8));
      if (long_chain(v, 8)) long_hits++;
    end
    for (longint i = 0; i < (longint'(1) << 16); i++) begin
      v = word_t'(i);
      x_dut_16 = 16'(v);
      #1;
      chk("dut_16", 16, v, word_t'(s_dut_16));
      if (long_chain(v, 16)) long_hits++;
    end
    for (int i = 0; i < 40000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(64) : rand_word(64);
      if (i < 4) v = (i == 0) ? '0 : (i == 1) ? mask(64) :
                     (i == 2) ? (word_t'(1) << 63) : (mask(64) >> 1);
      x_dut_64 = 64'(v);
      #1;
      chk("dut_64", 64, v, word_t'(s_dut_64));
      if (long_chain(v, 64)) long_hits++;
    end
    // every width must have seen operands with a full-length carry chain
    checks++;
    if (long_hits == 0) begin
      failures++;
      $display("FAIL no operand exercised a full-length carry chain");
    end
    $display("long-chain operands: %0d", long_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
