// tb_table2_sizes: the four 3X generators at the 8, 16, 32 and 64-bit
// operand widths of the published area/delay comparison.
//
// Each generator is instantiated at each width (16 instances). 8- and 16-bit
// instances are checked over every operand, 32- and 64-bit ones with random
// operands and operands that make a carry run the full width. Results are
// compared with 3X from integer arithmetic, and each mechanism (negative
// operand, full-width H and K chains, result using the extra bits) must have
// occurred for every generator/width pair.
module tb_table2_sizes;
  import hk3x_ref_pkg::*;

  logic [7:0] x_rcahk_ripple_8;
  logic [9:0] s_rcahk_ripple_8;
  rcahk_ripple #(.N(8)) u_rcahk_ripple_8 (.x(x_rcahk_ripple_8), .s(s_rcahk_ripple_8));

  logic [15:0] x_rcahk_ripple_16;
  logic [17:0] s_rcahk_ripple_16;
  rcahk_ripple #(.N(16)) u_rcahk_ripple_16 (.x(x_rcahk_ripple_16), .s(s_rcahk_ripple_16));

  logic [31:0] x_rcahk_ripple_32;
  logic [33:0] s_rcahk_ripple_32;
  rcahk_ripple #(.N(32)) u_rcahk_ripple_32 (.x(x_rcahk_ripple_32), .s(s_rcahk_ripple_32));

  logic [63:0] x_rcahk_ripple_64;
  logic [65:0] s_rcahk_ripple_64;
  rcahk_ripple #(.N(64)) u_rcahk_ripple_64 (.x(x_rcahk_ripple_64), .s(s_rcahk_ripple_64));

  logic [7:0] x_rcahk_fast_8;
  logic [9:0] s_rcahk_fast_8;
  rcahk_fast #(.N(8)) u_rcahk_fast_8 (.x(x_rcahk_fast_8), .s(s_rcahk_fast_8));

  logic [15:0] x_rcahk_fast_16;
  logic [17:0] s_rcahk_fast_16;
  rcahk_fast #(.N(16)) u_rcahk_fast_16 (.x(x_rcahk_fast_16), .s(s_rcahk_fast_16));

  logic [31:0] x_rcahk_fast_32;
  logic [33:0] s_rcahk_fast_32;
  rcahk_fast #(.N(32)) u_rcahk_fast_32 (.x(x_rcahk_fast_32), .s(s_rcahk_fast_32));

  logic [63:0] x_rcahk_fast_64;
  logic [65:0] s_rcahk_fast_64;
  rcahk_fast #(.N(64)) u_rcahk_fast_64 (.x(x_rcahk_fast_64), .s(s_rcahk_fast_64));

  logic [7:0] x_clahk_8;
  logic [9:0] s_clahk_8;
  clahk #(.N(8)) u_clahk_8 (.x(x_clahk_8), .s(s_clahk_8));

  logic [15:0] x_clahk_16;
  logic [17:0] s_clahk_16;
  clahk #(.N(16)) u_clahk_16 (.x(x_clahk_16), .s(s_clahk_16));

  logic [31:0] x_clahk_32;
  logic [33:0] s_clahk_32;
  clahk #(.N(32)) u_clahk_32 (.x(x_clahk_32), .s(s_clahk_32));

  logic [63:0] x_clahk_64;
  logic [65:0] s_clahk_64;
  clahk #(.N(64)) u_clahk_64 (.x(x_clahk_64), .s(s_clahk_64));

  logic [7:0] x_ppahk_8;
  logic [9:0] s_ppahk_8;
  ppahk #(.N(8)) u_ppahk_8 (.x(x_ppahk_8), .s(s_ppahk_8));

  logic [15:0] x_ppahk_16;
  logic [17:0] s_ppahk_16;
  ppahk #(.N(16)) u_ppahk_16 (.x(x_ppahk_16), .s(s_ppahk_16));

  logic [31:0] x_ppahk_32;
  logic [33:0] s_ppahk_32;
  ppahk #(.N(32)) u_ppahk_32 (.x(x_ppahk_32), .s(s_ppahk_32));

  logic [63:0] x_ppahk_64;
  logic [65:0] s_ppahk_64;
  ppahk #(.N(64)) u_ppahk_64 (.x(x_ppahk_64), .s(s_ppahk_64));

  int checks   = 0;
  int failures = 0;
  int unsigned ev [16][4];   // [generator][event] counts

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
    for (longint i = 0; i < (longint'(1) << 8); i++) begin
      v = word_t'(i);
      x_rcahk_ripple_8 = 8'(v);
      #1;
      chk("rcahk_ripple_8", 8, v, word_t'(s_rcahk_ripple_8));
      note(0, 8, v);
    end
    for (longint i = 0; i < (longint'(1) << 16); i++) begin
      v = word_t'(i);
      x_rcahk_ripple_16 = 16'(v);
      #1;
      chk("rcahk_ripple_16", 16, v, word_t'(s_rcahk_ripple_16));
      note(1, 16, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(32) : rand_word(32);
      x_rcahk_ripple_32 = 32'(v);
      #1;
      chk("rcahk_ripple_32", 32, v, word_t'(s_rcahk_ripple_32));
      note(2, 32, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(64) : rand_word(64);
      x_rcahk_ripple_64 = 64'(v);
      #1;
      chk("rcahk_ripple_64", 64, v, word_t'(s_rcahk_ripple_64));
      note(3, 64, v);
    end
    for (longint i = 0; i < (longint'(1) << 8); i++) begin
      v = word_t'(i);
      x_rcahk_fast_8 = 8'(v);
      #1;
      chk("rcahk_fast_8", 8, v, word_t'(s_rcahk_fast_8));
      note(4, 8, v);
    end
    for (longint i = 0; i < (longint'(1) << 16); i++) begin
      v = word_t'(i);
      x_rcahk_fast_16 = 16'(v);
      #1;
      chk("rcahk_fast_16", 16, v, word_t'(s_rcahk_fast_16));
      note(5, 16, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(32) : rand_word(32);
      x_rcahk_fast_32 = 32'(v);
      #1;
      chk("rcahk_fast_32", 32, v, word_t'(s_rcahk_fast_32));
      note(6, 32, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(64) : rand_word(64);
      x_rcahk_fast_64 = 64'(v);
      #1;
      chk("rcahk_fast_64", 64, v, word_t'(s_rcahk_fast_64));
      note(7, 64, v);
    end
    for (longint i = 0; i < (longint'(1) << 8); i++) begin
      v = word_t'(i);
      x_clahk_8 = 8'(v);
      #1;
      chk("clahk_8", 8, v, word_t'(s_clahk_8));
      note(8, 8, v);
    end
    for (longint i = 0; i < (longint'(1) << 16); i++) begin
      v = word_t'(i);
      x_clahk_16 = 16'(v);
      #1;
      chk("clahk_16", 16, v, word_t'(s_clahk_16));
      note(9, 16, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(32) : rand_word(32);
      x_clahk_32 = 32'(v);
      #1;
      chk("clahk_32", 32, v, word_t'(s_clahk_32));
      note(10, 32, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(64) : rand_word(64);
      x_clahk_64 = 64'(v);
      #1;
      chk("clahk_64", 64, v, word_t'(s_clahk_64));
      note(11, 64, v);
    end
    for (longint i = 0; i < (longint'(1) << 8); i++) begin
      v = word_t'(i);
      x_ppahk_8 = 8'(v);
      #1;
      chk("ppahk_8", 8, v, word_t'(s_ppahk_8));
      note(12, 8, v);
    end
    for (longint i = 0; i < (longint'(1) << 16); i++) begin
      v = word_t'(i);
      x_ppahk_16 = 16'(v);
      #1;
      chk("ppahk_16", 16, v, word_t'(s_ppahk_16));
      note(13, 16, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(32) : rand_word(32);
      x_ppahk_32 = 32'(v);
      #1;
      chk("ppahk_32", 32, v, word_t'(s_ppahk_32));
      note(14, 32, v);
    end
    for (int i = 0; i < 20000; i++) begin
      v = (i % 4 == 0) ? long_chain_word(64) : rand_word(64);
      x_ppahk_64 = 64'(v);
      #1;
      chk("ppahk_64", 64, v, word_t'(s_ppahk_64));
      note(15, 64, v);
    end
    begin
      string gname [16] = '{"rcahk_ripple_8", "rcahk_ripple_16", "rcahk_ripple_32", "rcahk_ripple_64", "rcahk_fast_8", "rcahk_fast_16", "rcahk_fast_32", "rcahk_fast_64", "clahk_8", "clahk_16", "clahk_32", "clahk_64", "ppahk_8", "ppahk_16", "ppahk_32", "ppahk_64"};
      string ename [4] = '{"negative operand", "carry from x_0 reaches S_N (H chain)", "carry from x_1 reaches S_N (K chain)", "result needs the two extra bits"};
      for (int g = 0; g < 16; g++)
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
