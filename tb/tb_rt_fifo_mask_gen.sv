// tb_rt_fifo_mask_gen: exhaustive test of the FIFO mask generator for four
// ways. Every combination of the three status vectors is applied and the
// mask compared with a rule table written out per case below, plus the
// worked example (empty lines 1111, LoB hits 1101 -> mask 1101).
module tb_rt_fifo_mask_gen;
  logic [3:0] empty_line, any_lob_empty, any_lob_hit, fifo_mask;
  int checks = 0, failures = 0;

  rt_fifo_mask_gen #(.WAYS(4)) dut (.empty_line, .any_lob_empty, .any_lob_hit, .fifo_mask);

  function automatic logic [3:0] expect_mask(logic [3:0] m1, logic [3:0] m2, logic [3:0] m3);
    logic [3:0] r;
    r = 4'b0000;
    if (m1 != 0) begin
      for (int w = 0; w < 4; w++) r[w] = m1[w] & m3[w];
      if (r == 0) r = m1;
    end else begin
      r = m3;
      if (r == 0) r = m2;
      if (r == 0) r = 4'b1111;
    end
    return r;
  endfunction

  initial begin
    empty_line = 4'b1111; any_lob_empty = 4'b1001; any_lob_hit = 4'b1101;
    #1;
    checks++; if (fifo_mask !== 4'b1101) begin failures++; $display("FAIL example: %b", fifo_mask); end
    for (int i = 0; i < 4096; i++) begin
      {empty_line, any_lob_empty, any_lob_hit} = 12'(i);
      #1;
      checks++;
      if (fifo_mask !== expect_mask(empty_line, any_lob_empty, any_lob_hit)) begin
        failures++;
        if (failures < 10) $display("FAIL M1=%b M2=%b M3=%b mask=%b", empty_line, any_lob_empty, any_lob_hit, fifo_mask);
      end
      checks++;
      if (fifo_mask == 0) begin failures++; $display("FAIL empty mask"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
