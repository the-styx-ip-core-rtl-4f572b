// tb_styx_cli_encoder: every request type is built byte for byte as Styx
// lays it out; an N-byte request leaves in N cycles when nothing stalls;
// Twrite data is pulled from a source with random gaps and the output
// buffer applies random back-pressure without bytes being lost.
module tb_styx_cli_encoder;
  import styx_pkg::*;
  import styx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0, nwname = 0, busy, done, dat_valid, dat_take, out_valid, out_ready = 1;
  logic [7:0]  ttype = 0, mode = 0, offset = 0, dat, out_data;
  logic [15:0] tag = 0, count = 0;
  logic [31:0] fid = 0, newfid = 0, msize = 0;
  name_t       name = 0;
  styx_cli_encoder dut (.*);

  bq_t got, src;
  int  stall_pct = 0;
  logic src_gap = 0;
  assign dat_valid = src.size() > 0 && !src_gap;
  assign dat       = src.size() > 0 ? src[0] : 8'h00;
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (dat_take) begin
      if (!dat_valid) begin failures++; $display("FAIL take without data"); end
      else void'(src.pop_front());
    end
    out_ready <= ($urandom % 100) >= stall_pct;
    src_gap   <= stall_pct != 0 && ($urandom % 4) == 0;
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic send(logic [7:0] t, int tg, bq_t exp, string what);
    int cyc;
    got = {};
    @(posedge clk); #1;
    start = 1; ttype = t; tag = 16'(tg);
    @(posedge clk); #1; start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    chk(got == exp, {what, " bytes"});
    if (got != exp) $display("  got %p\n  exp %p", got, exp);
    if (stall_pct == 0) chk(cyc == exp.size(), $sformatf("%s takes N cycles (%0d/%0d)", what, cyc, exp.size()));
  endtask

  initial begin
    bq_t d;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall_pct = pass ? 40 : 0;
      msize = 512;
      send(TVERSION, 16'hFFFF, tversion(16'hFFFF, 512, "9P2000"), "Tversion");
      fid = 0; name = nm("glenda");
      send(TATTACH, 1, tattach(1, 0, -1, "glenda", ""), "Tattach");
      newfid = 1; nwname = 0;
      send(TWALK, 2, twalk(2, 0, 1, ""), "Twalk clone");
      nwname = 1; name = nm("leds");
      send(TWALK, 3, twalk(3, 0, 1, "leds"), "Twalk name");
      fid = 1; mode = 8'd2;
      send(TOPEN, 4, topen(4, 1, 2), "Topen");
      offset = 8'd7; count = 16'd200;
      send(TREAD, 5, tread(5, 1, 7, 200), "Tread");
      send(TCLUNK, 6, tclunk(6, 1), "Tclunk");
      for (int n = 1; n <= 255; n += 127) begin
        d = {};
        for (int i = 0; i < n; i++) d.push_back(8'($urandom));
        src = d; offset = 0; count = 16'(n);
        send(TWRITE, 7 + n, twrite(7 + n, 1, 0, d), $sformatf("Twrite %0d", n));
        chk(src.size() == 0, "all data taken");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
