// tb_hk_prefix_tree: self-checking testbench of hk_prefix_tree.
//
// Four copies: the default (4 groups, H operator) and 4 groups with the K
// operator, and 17 groups with each operator (a group count that is not a
// power of two). Random (g, p) vectors are applied; output j must equal the
// generate term of the span 0..j folded serially from group 0 upward:
//   H: g = g_j | p_j g_acc, p = p_j p_acc
//   K: g = g_j (p_j | g_acc), p = p_j | p_acc
module tb_hk_prefix_tree;
  import hk3x_pkg::hk_gp_t;

  hk_gp_t [3:0]  gp4h, gp4k;
  hk_gp_t [16:0] gp17h, gp17k;
  logic   [3:0]  y4h, y4k;
  logic   [16:0] y17h, y17k;

  hk_prefix_tree dut (.gp(gp4h), .y(y4h));
  hk_prefix_tree #(.NG(4),  .IS_K(1'b1)) dut_4k  (.gp(gp4k),  .y(y4k));
  hk_prefix_tree #(.NG(17), .IS_K(1'b0)) dut_17h (.gp(gp17h), .y(y17h));
  hk_prefix_tree #(.NG(17), .IS_K(1'b1)) dut_17k (.gp(gp17k), .y(y17k));

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

  function automatic logic [16:0] fold(logic [33:0] v, int unsigned ng, bit is_k);
    logic [16:0] y;
    logic g, p;
    y = '0;
    g = v[1]; p = v[0];
    y[0] = g;
    for (int unsigned j = 1; j < ng; j++) begin
      if (is_k) begin
        g = v[2*j+1] & (v[2*j] | g);
        p = v[2*j] | p;
      end else begin
        g = v[2*j+1] | (v[2*j] & g);
        p = v[2*j] & p;
      end
      y[j] = g;
    end
    return y;
  endfunction

  initial begin : stimulus
    logic [33:0] a, b, c, d;
    for (int i = 0; i < 50000; i++) begin
      a = 34'({$urandom(), $urandom()});
      b = 34'({$urandom(), $urandom()});
      c = 34'({$urandom(), $urandom()});
      d = 34'({$urandom(), $urandom()});
      // bias some vectors towards all-propagate so long spans are exercised
      if (i % 4 == 0) begin
        for (int j = 0; j < 17; j++) begin
          c[2*j] = 1'b1;
          d[2*j] = 1'b0;
        end
      end
      gp4h = 8'(a); gp4k = 8'(b); gp17h = c; gp17k = d;
      #1;
      chk($sformatf("4H %h", a[7:0]),  72'(y4h),  72'(fold(a, 4, 0) & 17'hf));
      chk($sformatf("4K %h", b[7:0]),  72'(y4k),  72'(fold(b, 4, 1) & 17'hf));
      chk($sformatf("17H %h", c), 72'(y17h), 72'(fold(c, 17, 0)));
      chk($sformatf("17K %h", d), 72'(y17k), 72'(fold(d, 17, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
