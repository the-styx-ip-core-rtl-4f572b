// tb_styx_namespace: preload of the four device files (ready after 92
// cycles), search by name (found/not found, 24 cycles per record looked
// at), streaming writes into a file and to the devices, building a new
// record with append + commit, reading it back on the encoder port,
// deleting it, the free-space count, and a file stored in two parts being
// searched by the offset of a byte (the part holding it and the offset
// within that part).
module tb_styx_namespace;
  import styx_pkg::*;
  import styx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ns_cmd_t    cmd = NS_NOP;
  logic       cmd_valid = 0, ready, done, found, bell;
  name_t      name = 0;
  logic       seek_en = 0;
  logic [15:0] seek = 0;
  logic [7:0] part_off;
  logic [8:0] rec = 0, rec_o, rd_rec = 0;
  logic [8:0] off = 0;
  logic [7:0] wdata = 0, dev = 0, len_o, rd_off = 0, rd_dev = 0, rd_data, leds, switches = 8'h5C;
  qid_t       qid_o;
  logic [9:0] free_bytes;
  logic [6:0] seg_lo, seg_hi;
  styx_namespace #(.NS_BYTES(512), .PRELOAD(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic name_t nm(string s);
    name_t n = '0;
    for (int i = 0; i < s.len() && i < 8; i++) n[8*i +: 8] = 8'(s[i]);
    return n;
  endfunction

  task automatic find(string s, output int cyc);
    @(posedge clk); #1; cmd = NS_FIND; cmd_valid = 1; name = nm(s);
    @(posedge clk); #1; cmd_valid = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
  endtask
  task automatic op(ns_cmd_t c, logic [8:0] r, logic [8:0] o, logic [7:0] d, logic [7:0] dv);
    @(posedge clk); #1; cmd = c; cmd_valid = 1; rec = r; off = o; wdata = d; dev = dv;
    @(posedge clk); #1; cmd_valid = 0;
  endtask
  task automatic rd(logic [8:0] r, logic [7:0] o, logic [7:0] dv, output logic [7:0] v);
    rd_rec = r; rd_off = o; rd_dev = dv; @(posedge clk); #1; v = rd_data;
  endtask

  initial begin
    int cyc, c1, c4;
    logic [7:0] v;
    bq_t rq;
    repeat (2) @(posedge clk); #1 rst_n = 1; cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    chk(cyc == 92, $sformatf("preload takes 92 cycles (%0d)", cyc));
    chk(free_bytes == 10'(512 - 92), "free space after preload");
    find("leds", c1);
    chk(found && rec_o == 0 && len_o == 1 && qid_o.path == 64'd1 && qid_o.qtype == QT_FILE, "leds found");
    find("bell", c4);
    chk(found && rec_o == 69 && qid_o.path == 64'd4, "bell found");
    chk(c4 - c1 == 3 * 24, $sformatf("24 cycles per record (%0d, %0d)", c1, c4));
    find("switches", cyc); chk(found && rec_o == 23, "8-character name found");
    find("nothere", cyc);  chk(!found, "missing name not found");
    find("led", cyc);      chk(!found, "prefix does not match");
    // device writes through the file data
    op(NS_WRITE, 0, 0, 8'hC3, DEV_LEDS); chk(leds == 8'hC3, "LED file write drives LEDs");
    op(NS_WRITE, 46, 0, 8'h42, DEV_SEG); chk(seg_lo == hex7(4'h2) && seg_hi == hex7(4'h4), "display");
    op(NS_WRITE, 69, 0, 8'h01, DEV_BELL); chk(bell, "bell");
    rd(0, 0, DEV_LEDS, v); chk(v == 8'hC3, "LED file holds written byte");
    repeat (3) @(posedge clk);
    rd(23, 0, DEV_SWITCH, v); chk(v == 8'h5C, "switch file reads switches");
    // new record: QID(dir? no: file, path 9), name "notes", capacity 40
    rq = {styx_tb_pkg::qid(0, 0, 9), raw8("notes"), 8'd40};
    for (int i = 0; i < 40; i++) rq.push_back(8'(i * 3));
    foreach (rq[i]) op(NS_APPEND, 0, 9'(i), rq[i], 0);
    find("notes", cyc); chk(!found, "uncommitted record invisible");
    op(NS_COMMIT, 0, 9'(rq.size()), 0, 0);
    chk(free_bytes == 10'(512 - 92 - 62), "free space after commit");
    find("notes", cyc);
    chk(found && rec_o == 92 && len_o == 40 && qid_o.path == 64'd9, "new record found");
    for (int i = 0; i < 40; i++) begin
      rd(92, 8'(i), 0, v); chk(v == 8'(i * 3), "new record data");
    end
    op(NS_WRITE, 92, 5, 8'hEE, 8'd9); rd(92, 5, 0, v); chk(v == 8'hEE, "write into new record");
    chk(leds == 8'hC3, "non-device write leaves LEDs");
    op(NS_DELETE, 92, 0, 0, 0);
    find("notes", cyc); chk(!found, "deleted record not found");
    find("bell", cyc);  chk(found, "other records still found");
    // a file in two parts: 10 + 5 bytes, found by the offset of a byte
    for (int pt = 0; pt < 2; pt++) begin
      int n;
      n = pt ? 5 : 10;
      rq = {styx_tb_pkg::qid(0, 0, 12), raw8("cam"), 8'(n)};
      for (int i = 0; i < n; i++) rq.push_back(8'(pt * 16 + i));
      foreach (rq[i]) op(NS_APPEND, 0, 9'(i), rq[i], 0);
      op(NS_COMMIT, 0, 9'(rq.size()), 0, 0);
    end
    seek_en = 1;
    for (int s = 0; s < 17; s += 3) begin
      seek = 16'(s); find("cam", cyc);
      if (s < 10)      chk(found && rec_o == 154 && part_off == 8'(s) && len_o == 10, $sformatf("seek %0d in part 1", s));
      else if (s < 15) chk(found && rec_o == 186 && part_off == 8'(s - 10) && len_o == 5, $sformatf("seek %0d in part 2", s));
      else             chk(!found, "seek past the end");
      if (found) begin rd(rec_o, part_off, 0, v); chk(v == 8'((s >= 10) * 16 + (s % 10)), "byte at seek"); end
    end
    seek = 16'd14; find("cam", cyc); chk(found && rec_o == 186 && part_off == 4, "last byte of last part");
    seek = 16'd3; find("bell", cyc); chk(!found, "seek past a one-byte file");
    seek_en = 0; seek = 16'd12; find("cam", cyc); chk(found && rec_o == 154, "without seek the first part is found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
