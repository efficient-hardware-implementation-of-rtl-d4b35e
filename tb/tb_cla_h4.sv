// tb_cla_h4: exhaustive self-checking testbench of cla_h4 (first-level H
// look-ahead). All 512 combinations of gh, ph and h_in are applied; the
// three H outputs are compared with the carry recurrence H' = gh | ph H
// stepped group by group, and the inverted group outputs with the same
// recurrence started from 0 (generate) and the AND of the propagates.
module tb_cla_h4;
  logic [3:0] gh, ph;
  logic       h_in;
  logic [2:0] h_o;
  logic       gh_n_o, ph_n_o;

  cla_h4 dut (.*);

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
    logic h, g;
    for (int v = 0; v < 512; v++) begin
      {gh, ph, h_in} = 9'(v);
      #1;
      h = h_in;
      g = 1'b0;
      for (int m = 0; m < 4; m++) begin
        h = gh[m] | (ph[m] & h);
        g = gh[m] | (ph[m] & g);
        if (m < 3) chk($sformatf("h_o[%0d] v=%0d", m, v), 72'(h_o[m]), 72'(h));
      end
      chk($sformatf("gh_n_o v=%0d", v), 72'(gh_n_o), 72'(!g));
      chk($sformatf("ph_n_o v=%0d", v), 72'(ph_n_o), 72'(!(&ph)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
