// tb_hk_add4: self-checking testbench of hk_add4 (four-bit final sum).
//
// Three copies sit at group positions b = 2, 6 and 10 of a 16-bit operand.
// For every 16-bit X, each copy gets H_b and K_b from the bit-serial H/K
// recurrence and the four input bits above b; its sum bits are compared
// with bits b+1 .. b+4 of 3X from integer arithmetic, and its local pair
// with the recurrence's H_{b+2} and K_{b+2}.
module tb_hk_add4;
  import hk3x_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [3:0] xa  [3];
  logic       hin [3];
  logic       kin [3];
  logic [3:0] sa  [3];
  logic       hm  [3];
  logic       km  [3];

  hk_add4 dut (.x(xa[0]), .h_in(hin[0]), .k_in(kin[0]), .s(sa[0]),
               .h_mid(hm[0]), .k_mid(km[0]));
  hk_add4 dut1 (.x(xa[1]), .h_in(hin[1]), .k_in(kin[1]), .s(sa[1]),
                .h_mid(hm[1]), .k_mid(km[1]));
  hk_add4 dut2 (.x(xa[2]), .h_in(hin[2]), .k_in(kin[2]), .s(sa[2]),
                .h_mid(hm[2]), .k_mid(km[2]));

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
    word_t v, h, k, s3;
    int unsigned b;
    for (int i = 0; i < (1 << N); i++) begin
      v = word_t'(i);
      ref_hk(v, N, h, k);
      s3 = ref3x(v, N);
      for (int j = 0; j < 3; j++) begin
        b = 4 * j + 2;
        xa[j]  = v[b+1 +: 4];
        hin[j] = h[b];
        kin[j] = k[b];
      end
      #1;
      for (int j = 0; j < 3; j++) begin
        b = 4 * j + 2;
        chk($sformatf("s b=%0d x=%h", b, v), 72'(sa[j]), 72'(s3[b+1 +: 4]));
        chk($sformatf("h_mid b=%0d x=%h", b, v), 72'(hm[j]), 72'(h[b+2]));
        chk($sformatf("k_mid b=%0d x=%h", b, v), 72'(km[j]), 72'(k[b+2]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
