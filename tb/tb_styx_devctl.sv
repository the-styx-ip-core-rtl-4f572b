// tb_styx_devctl: file writes reach the LEDs, the display and the bell;
// reads of the switch file are answered with the synchronised switches one
// cycle after the read address; other files are not overridden.
module tb_styx_devctl;
  import styx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, ovr_valid, bell;
  logic [7:0] wr_dev = 0, wr_off = 0, wr_data = 0, rd_dev = 0, rd_off = 0, ovr_data, leds, switches = 0;
  logic [6:0] seg_lo, seg_hi;
  styx_devctl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(logic [7:0] d, logic [7:0] o, logic [7:0] v);
    @(posedge clk); #1; wr_en = 1; wr_dev = d; wr_off = o; wr_data = v;
    @(posedge clk); #1; wr_en = 0;
  endtask
  // segment pattern worked out by hand: gfedcba for 0..F
  logic [6:0] seg_ref [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                               7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wr(DEV_LEDS, 0, 8'hA7);  chk(leds == 8'hA7, "LED write");
    wr(DEV_LEDS, 1, 8'h00);  chk(leds == 8'hA7, "byte 1 of LED file ignored");
    wr(DEV_BELL, 0, 8'h01);  chk(bell, "bell on");
    wr(DEV_BELL, 0, 8'h00);  chk(!bell, "bell off");
    for (int v = 0; v < 256; v += 17) begin
      wr(DEV_SEG, 0, 8'(v));
      chk(seg_lo == seg_ref[v % 16] && seg_hi == seg_ref[v / 16], "display digits");
    end
    wr(8'd9, 0, 8'h00); chk(leds == 8'hA7, "unknown device ignored");
    switches = 8'h3E; repeat (3) @(posedge clk);
    #1 rd_dev = DEV_SWITCH; rd_off = 0;
    @(posedge clk); #1 chk(ovr_valid && ovr_data == 8'h3E, "switch read override");
    rd_dev = DEV_LEDS;
    @(posedge clk); #1 chk(!ovr_valid, "no override for LED file");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
