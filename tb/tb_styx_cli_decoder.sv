// tb_styx_cli_decoder: the client decoder with a real client encoder.
// Instructions 0x01-0x07 must produce the expected T messages (tags counting
// up, Tversion with NOTAG, Topen with a name as Twalk + Topen), and R
// messages must be reported with their type and tag, Rerror flagged and
// Rread data passed out. A small model stands in for the dispatcher: it
// reads the code and length (or size and type) and starts the decoder.
module tb_styx_cli_decoder;
  import styx_pkg::*;
  import styx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, is_inst = 0, done, in_valid, in_pop;
  logic [7:0] code = 0, in_data;
  logic [15:0] blen = 0;
  logic enc_start, enc_nwname, enc_done, enc_dat_valid, enc_dat_take;
  logic [7:0] enc_type, enc_mode, enc_offset, enc_dat;
  logic [15:0] enc_tag, enc_count;
  logic [31:0] enc_fid, enc_newfid, enc_msize;
  name_t enc_name;
  logic rsp_valid, rsp_err, dat_valid;
  logic [7:0] rsp_type, dat;
  logic [15:0] rsp_tag;
  logic out_valid, out_ready = 1, enc_busy;
  logic [7:0] out_data;

  styx_cli_decoder #(.MSIZE(512)) dut (.*);
  styx_cli_encoder enc (
    .clk, .rst_n, .start(enc_start), .ttype(enc_type), .tag(enc_tag), .fid(enc_fid),
    .newfid(enc_newfid), .nwname(enc_nwname), .name(enc_name), .mode(enc_mode),
    .offset(enc_offset), .count(enc_count), .msize(enc_msize), .busy(enc_busy), .done(enc_done),
    .dat_valid(enc_dat_valid), .dat(enc_dat), .dat_take(enc_dat_take),
    .out_valid, .out_data, .out_ready);

  bq_t inq, got, dgot;
  logic [7:0] rt[$]; logic [15:0] rtag[$]; logic rerr[$];
  assign in_valid = inq.size() > 0;
  assign in_data  = in_valid ? inq[0] : 8'h00;
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (out_valid && out_ready) got.push_back(out_data);
    if (dat_valid) dgot.push_back(dat);
    if (rsp_valid) begin rt.push_back(rsp_type); rtag.push_back(rsp_tag); rerr.push_back(rsp_err); end
    out_ready <= ($urandom % 4) != 0;
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // dispatcher model: takes the header off the queue and starts the decoder
  task automatic run(bq_t q, bit ins = 0);
    logic [31:0] sz;
    inq = q;
    @(posedge clk); #1;
    if (ins) begin
      is_inst = 1; code = q[0]; blen = {q[2], q[1]};
      repeat (3) void'(inq.pop_front());
    end else begin
      is_inst = 0; sz = {q[3], q[2], q[1], q[0]}; code = q[4]; blen = 16'(sz - 5);
      repeat (5) void'(inq.pop_front());
    end
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    chk(inq.size() == 0, "whole transaction consumed");
  endtask

  task automatic runi(bq_t q);
    run(q, 1);
  endtask

  task automatic expect_out(bq_t exp, string what);
    chk(got == exp, what);
    if (got != exp) $display("  got %p\n  exp %p", got, exp);
    got = {};
  endtask

  initial begin
    bq_t d, e;
    e = {};
    repeat (2) @(posedge clk); rst_n = 1;
    runi(inst(1, e));                       expect_out(tversion(16'hFFFF, 512, "9P2000"), "Tversion");
    runi(inst(2, bytes("glenda")));         expect_out(tattach(0, 0, -1, "glenda", ""), "Tattach");
    runi(inst(3, e));                       expect_out(twalk(1, 0, 1, ""), "Twalk clone");
    runi(inst(3, bytes("segment")));        expect_out(twalk(2, 0, 1, "segment"), "Twalk name");
    runi(inst(4, {8'd1, bytes("leds")}));   expect_out({twalk(3, 0, 1, "leds"), topen(4, 1, 1)}, "Topen with walk");
    runi(inst(4, {8'd0}));                  expect_out(topen(5, 1, 0), "Topen alone");
    runi(inst(5, {8'd3, 8'd100}));          expect_out(tread(6, 1, 3, 100), "Tread");
    d = {};
    for (int i = 0; i < 200; i++) d.push_back(8'($urandom));
    runi(inst(6, d));                       expect_out(twrite(7, 1, 0, d), "Twrite 200");
    runi(inst(7, e));                       expect_out(tclunk(8, 1), "Tclunk");
    runi(inst(8'h55, bytes("xyz")));        expect_out(e, "unknown instruction dropped");
    // R messages
    run(rversion(16'hFFFF, 512, "9P2000"));
    run(rattach(0, styx_tb_pkg::qid(128, 0, 0)));
    run(rerror(2, "no file"));
    d = {};
    for (int i = 0; i < 37; i++) d.push_back(8'($urandom));
    run(rread(6, d));
    run(rclunk(8));
    chk(got.size() == 0, "R messages produce no output");
    chk(rt.size() == 5, "five responses reported");
    if (rt.size() == 5) begin
      chk(rt[0] == RVERSION && rtag[0] == 16'hFFFF && !rerr[0], "Rversion reported");
      chk(rt[1] == RATTACH && rtag[1] == 0 && !rerr[1], "Rattach reported");
      chk(rt[2] == RERROR && rtag[2] == 2 && rerr[2], "Rerror flagged");
      chk(rt[3] == RREAD && rtag[3] == 6 && !rerr[3], "Rread reported");
      chk(rt[4] == RCLUNK && rtag[4] == 8, "Rclunk reported");
    end
    chk(dgot == d, "Rread data passed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
