// tb_hk_group_pg: self-checking testbench of hk_group_pg.
//
// Instantiates the block at its default width (68) and at 18. For random
// operands, and operands with long carry chains, the group pairs must carry
// the bit-serial H/K recurrence four bits at a time:
//   H_{4j+2} = gh_j | ph_j H_{4j-2},  K_{4j+2} = gk_j (pk_j | K_{4j-2})
// with H_2 = gh_0, K_2 = gk_0, ph_0 = 0 and pk_0 = 1.
module tb_hk_group_pg;
  import hk3x_ref_pkg::*;
  import hk3x_pkg::hk_gp_t;

  logic   [67:0]   x;
  hk_gp_t [16:0]   gph, gpk;
  logic   [17:0]   xs;
  hk_gp_t [3:0]    gphs, gpks;

  hk_group_pg dut (.x(x), .gph(gph), .gpk(gpk));
  hk_group_pg #(.N(18)) dut_18 (.x(xs), .gph(gphs), .gpk(gpks));

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

  task automatic check_groups(int unsigned n, word_t v, hk_gp_t gh [], hk_gp_t gk []);
    word_t h, k;
    ref_hk(v, n, h, k);
    chk($sformatf("gh0 n=%0d x=%h", n, v), 72'(gh[0].g), 72'(h[2]));
    chk($sformatf("gk0 n=%0d x=%h", n, v), 72'(gk[0].g), 72'(k[2]));
    chk($sformatf("ph0/pk0 n=%0d", n), 72'({gh[0].p, gk[0].p}), 72'(2'b01));
    for (int j = 1; j < n / 4; j++) begin
      chk($sformatf("H%0d n=%0d x=%h", 4*j+2, n, v),
          72'(gh[j].g | (gh[j].p & h[4*j-2])), 72'(h[4*j+2]));
      chk($sformatf("K%0d n=%0d x=%h", 4*j+2, n, v),
          72'(gk[j].g & (gk[j].p | k[4*j-2])), 72'(k[4*j+2]));
      // with no incoming span the generate alone must be the value
      chk($sformatf("gh%0d n=%0d x=%h", j, n, v), 72'(gh[j].g),
          72'(v[4*j+2] | (v[4*j+1] & v[4*j])));
      chk($sformatf("gk%0d n=%0d x=%h", j, n, v), 72'(gk[j].g),
          72'(v[4*j+2] & (v[4*j+1] | v[4*j])));
    end
  endtask

  initial begin : stimulus
    word_t v;
    hk_gp_t a [], b [];
    for (int i = 0; i < 20000; i++) begin
      v = (i % 3 == 0) ? long_chain_word(68) : rand_word(68);
      x  = 68'(v);
      xs = 18'(v);
      #1;
      a = new[17]; b = new[17];
      for (int j = 0; j < 17; j++) begin a[j] = gph[j]; b[j] = gpk[j]; end
      check_groups(68, v, a, b);
      a = new[4]; b = new[4];
      for (int j = 0; j < 4; j++) begin a[j] = gphs[j]; b[j] = gpks[j]; end
      check_groups(18, v & mask(18), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
