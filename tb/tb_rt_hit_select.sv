// tb_rt_hit_select: random test of the way-hit combiner for four ways of
// 4 x 32-bit lines. Per-way LowTagHit and LoBHit are drawn so that at most
// one way has both; the hit flag, the encoded way and the selected word are
// compared with values worked out in the testbench.
module tb_rt_hit_select;
  logic [3:0]        low_tag_hit, lob_hit, way_hit;
  logic [3:0][127:0] way_data;
  logic [1:0]        word_sel, hit_way;
  logic              hit;
  logic [127:0]      hit_line;
  logic [31:0]       hit_word;
  int checks = 0, failures = 0;

  rt_hit_select #(.WAYS(4), .WORD_W(32), .LINE_WORDS(4)) dut (.*);

  initial begin
    int hw;
    for (int n = 0; n < 2000; n++) begin
      hw = $urandom_range(0, 4);            // 4 = no way hits
      for (int w = 0; w < 4; w++) begin
        way_data[w] = {$urandom, $urandom, $urandom, $urandom};
        if (w == hw) begin
          low_tag_hit[w] = 1; lob_hit[w] = 1;
        end else begin
          // any pair except both set
          case ($urandom_range(0, 2))
            0: begin low_tag_hit[w] = 0; lob_hit[w] = 0; end
            1: begin low_tag_hit[w] = 1; lob_hit[w] = 0; end
            default: begin low_tag_hit[w] = 0; lob_hit[w] = 1; end
          endcase
        end
      end
      word_sel = 2'($urandom_range(0, 3));
      #1;
      checks++;
      if (hit !== (hw < 4)) begin failures++; $display("FAIL hit=%b hw=%0d", hit, hw); end
      if (hw < 4) begin
        checks += 3;
        if (hit_way !== 2'(hw)) begin failures++; $display("FAIL way %0d want %0d", hit_way, hw); end
        if (hit_word !== way_data[hw][32*word_sel +: 32]) begin failures++; $display("FAIL word"); end
        if (way_hit !== (4'b1 << hw)) begin failures++; $display("FAIL way_hit %b", way_hit); end
      end
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
