// tb_cla_k_l2: exhaustive self-checking testbench of cla_k_l2 (second-level
// K look-ahead). All 512 input combinations are applied; each output is
// compared with K_out = GK (PK | K_in) stepped block by block, with GK and
// PK the complements of the inverted inputs.
module tb_cla_k_l2;
  logic [3:0] gk_n, pk_n, k_o;
  logic       k2;

  cla_k_l2 dut (.*);

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
    logic k;
    for (int v = 0; v < 512; v++) begin
      {gk_n, pk_n, k2} = 9'(v);
      #1;
      k = k2;
      for (int b = 0; b < 4; b++) begin
        k = ~gk_n[b] & (~pk_n[b] | k);
        chk($sformatf("k_o[%0d] v=%0d", b, v), 72'(k_o[b]), 72'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
