// tb_cla_h_l2: exhaustive self-checking testbench of cla_h_l2 (second-level
// H look-ahead). All 512 input combinations are applied; each output is
// compared with H_out = GH | PH H_in stepped block by block, with GH and PH
// the complements of the inverted inputs.
module tb_cla_h_l2;
  logic [3:0] gh_n, ph_n, h_o;
  logic       h2;

  cla_h_l2 dut (.*);

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
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic h;
    for (int v = 0; v < 512; v++) begin
      {gh_n, ph_n, h2} = 9'(v);
      #1;
      h = h2;
      for (int b = 0; b < 4; b++) begin
        h = ~gh_n[b] | (~ph_n[b] & h);
        chk($sformatf("h_o[%0d] v=%0d", b, v), 72'(h_o[b]), 72'(h));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
