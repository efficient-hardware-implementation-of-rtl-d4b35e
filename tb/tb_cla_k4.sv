// tb_cla_k4: exhaustive self-checking testbench of cla_k4 (first-level K
// look-ahead). All 512 combinations of gk, pk and k_in are applied; the
// three K outputs are compared with the recurrence K' = gk (pk | K) stepped
// group by group, the inverted group generate with the same recurrence
// started from 1, and the inverted group propagate with the NOR of pk.
module tb_cla_k4;
  logic [3:0] gk, pk;
  logic       k_in;
  logic [2:0] k_o;
  logic       gk_n_o, pk_n_o;

  cla_k4 dut (.*);

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
    logic k, g;
    for (int v = 0; v < 512; v++) begin
      {gk, pk, k_in} = 9'(v);
      #1;
      k = k_in;
      g = 1'b1;
      for (int m = 0; m < 4; m++) begin
        k = gk[m] & (pk[m] | k);
        g = gk[m] & (pk[m] | g);
        if (m < 3) chk($sformatf("k_o[%0d] v=%0d", m, v), 72'(k_o[m]), 72'(k));
      end
      chk($sformatf("gk_n_o v=%0d", v), 72'(gk_n_o), 72'(!g));
      chk($sformatf("pk_n_o v=%0d", v), 72'(pk_n_o), 72'(!(|pk)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
