// tb_styx_srv_decoder: the server decoder with the real namespace,
// authentication unit and server encoder around it, fed from a queue that
// stands in for the input buffer. A small dispatcher model reads the header
// (size + type, or code + length) and starts the decoder. Checked: each T
// message gets the right R message, version/auth/fid/permission/open
// errors, Tstat, unsupported messages, the server instructions (add,
// delete, rights, user, verification mode) and their error codes, a file
// stored in two parts read and written across both parts, and that a
// written byte reaches the LEDs.
module tb_styx_srv_decoder;
  import styx_pkg::*;
  import styx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int NS_AW = 9;

  logic start = 0, is_inst = 0, done, in_valid, in_pop;
  logic [7:0] code = 0, in_data;
  logic [15:0] blen = 0;
  ns_cmd_t          ns_cmd;
  logic             ns_valid, ns_ready, ns_done, ns_found;
  name_t            ns_name;
  logic             ns_seek_en;
  logic [15:0]      ns_seek;
  logic [7:0]       ns_part_off;
  logic [NS_AW-1:0] ns_rec, ns_rec_o, enc_rd_rec, ns_rd_rec;
  logic [8:0]       ns_off;
  logic [7:0]       ns_wdata, ns_dev, ns_len_o, enc_rd_base, enc_rd_dev, ns_rd_off, ns_rd_dev, ns_rd_data;
  qid_t             ns_qid_o, enc_qid;
  logic [NS_AW:0]   ns_free;
  name_t            au_version, au_user, au_pass, au_user_name, au_user_pass;
  logic [7:0]       au_path, au_user_idx, au_perm_path, enc_type, verif_mode, leds;
  logic [1:0]       au_mode, au_perm_bits;
  logic             au_version_ok, au_pass_ok, au_attach_ok, au_perm_ok, au_mark, au_set_user, au_set_perm;
  logic             enc_start, enc_done, enc_busy, out_valid, bell;
  logic [15:0]      enc_tag;
  err_t             enc_err, inst_err;
  logic [31:0]      enc_val;
  name_t            enc_name;
  logic [7:0]       out_data;
  logic [6:0]       seg_lo, seg_hi;

  styx_srv_decoder #(.NFID(4), .NS_AW(NS_AW), .MSIZE(512)) dut (.*);

  styx_auth #(.NUSERS(4)) u_auth (
    .clk, .rst_n,
    .q_version(au_version), .version_ok(au_version_ok),
    .q_user(au_user), .q_pass(au_pass), .pass_ok(au_pass_ok), .attach_ok(au_attach_ok),
    .q_path(au_path), .q_mode(au_mode), .perm_ok(au_perm_ok),
    .mark_auth(au_mark),
    .set_user(au_set_user), .set_user_idx(au_user_idx),
    .set_user_name(au_user_name), .set_user_pass(au_user_pass),
    .set_perm(au_set_perm), .set_perm_path(au_perm_path), .set_perm_bits(au_perm_bits));
  styx_namespace #(.NS_BYTES(512), .PRELOAD(1'b1)) u_ns (
    .clk, .rst_n,
    .cmd(ns_cmd), .cmd_valid(ns_valid), .ready(ns_ready), .done(ns_done),
    .name(ns_name), .seek_en(ns_seek_en), .seek(ns_seek), .part_off(ns_part_off), .rec(ns_rec), .off(ns_off), .wdata(ns_wdata), .dev(ns_dev),
    .found(ns_found), .rec_o(ns_rec_o), .qid_o(ns_qid_o), .len_o(ns_len_o),
    .free_bytes(ns_free),
    .rd_rec(ns_rd_rec), .rd_off(ns_rd_off), .rd_dev(ns_rd_dev), .rd_data(ns_rd_data),
    .leds, .switches(8'h99), .seg_lo, .seg_hi, .bell);
  styx_srv_encoder #(.NS_AW(NS_AW)) u_enc (
    .clk, .rst_n,
    .start(enc_start), .rtype(enc_type), .tag(enc_tag), .err(enc_err), .qid(enc_qid),
    .val(enc_val), .name(enc_name), .rd_rec(enc_rd_rec), .rd_base(enc_rd_base), .rd_dev(enc_rd_dev),
    .busy(enc_busy), .done(enc_done),
    .out_valid, .out_data, .out_ready(1'b1),
    .ns_rd_rec, .ns_rd_off, .ns_rd_dev, .ns_rd_data);

  bq_t inq, got;
  assign in_valid = inq.size() > 0;
  assign in_data  = in_valid ? inq[0] : 8'h00;
  always @(posedge clk) begin
    if (in_pop) void'(inq.pop_front());
    if (out_valid) got.push_back(out_data);
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bq_t q, bit ins);
    logic [31:0] sz;
    inq = q; got = {};
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
  task automatic rpc(bq_t t, bq_t r, string what);
    run(t, 0);
    chk(got == r, what);
    if (got != r) $display("  got %p\n  exp %p", got, r);
  endtask
  task automatic ins(bq_t q, err_t e, string what);
    run(q, 1);
    chk(got.size() == 0 && inst_err == e, what);
  endtask

  initial begin
    bq_t qroot, qleds, qsw, qnew, rec, d, e;
    e = {};
    qroot = styx_tb_pkg::qid(8'h80, 0, 0);
    qleds = styx_tb_pkg::qid(0, 0, 1);
    qsw   = styx_tb_pkg::qid(0, 0, 2);
    qnew  = styx_tb_pkg::qid(0, 0, 7);
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ns_ready) @(posedge clk);
    rpc(tversion(16'hFFFF, 8192, "9P2001"), rerror(16'hFFFF, "version"), "wrong version");
    rpc(tversion(16'hFFFF, 8192, "9P2000"), rversion(16'hFFFF, 512, "9P2000"), "Tversion");
    rpc(tattach(1, 0, -1, "nobody", ""), rerror(1, "auth"), "unknown user");
    rpc(tattach(2, 0, -1, "inferno", ""), rattach(2, qroot), "Tattach");
    rpc(twalk(3, 0, 1, "leds"), rwalk(3, qleds), "Twalk");
    rpc(twalk(4, 0, 2, "nothing"), rerror(4, "no file"), "walk to missing file");
    rpc(twalk(5, 3, 2, "leds"), rerror(5, "bad fid"), "walk from unknown fid");
    rpc(twrite(6, 1, 0, {8'h11}), rerror(6, "not open"), "write before open");
    rpc(topen(7, 1, 1), ropen(7, qleds, 0), "Topen");
    rpc(twrite(8, 1, 0, {8'h5A}), rwrite(8, 1), "Twrite");
    chk(leds == 8'h5A, "LEDs follow the file");
    rpc(tclunk(9, 1), rclunk(9), "Tclunk");
    rpc(tclunk(10, 1), rerror(10, "bad fid"), "clunk twice");
    rpc(frame(124, 11, le32(0)), rstat(11, qroot, 0, "/"), "Tstat of the root");
    rpc(frame(124, 11, le32(7)), rerror(11, "bad fid"), "Tstat of unknown fid");
    rpc(frame(125, 11, le32(0)), rerror(11, "no"), "unsupported message");
    // read the switch file
    rpc(twalk(12, 0, 2, "switches"), rwalk(12, qsw), "walk switches");
    rpc(topen(13, 2, 0), ropen(13, qsw, 0), "open switches");
    d = {8'h99};
    rpc(tread(14, 2, 0, 10), rread(14, d), "read switches");
    rpc(tclunk(15, 2), rclunk(15), "clunk switches");
    // add a file by instruction and use it
    rec = {qnew, raw8("notes"), 8'd6, bytes("hello!")};
    ins(inst(8'h80, rec), E_NONE, "add file");
    rpc(twalk(16, 0, 1, "notes"), rwalk(16, qnew), "walk new file");
    rpc(topen(17, 1, 2), ropen(17, qnew, 0), "open new file");
    rpc(tread(18, 1, 1, 3), rread(18, bytes("ell")), "read part of new file");
    rpc(twrite(19, 1, 0, bytes("HE")), rwrite(19, 2), "write into new file");
    rpc(tread(20, 1, 0, 100), rread(20, bytes("HEllo!")), "read back, count clipped");
    rpc(frame(124, 21, le32(1)), rstat(21, qnew, 6, "notes"), "Tstat of a file");
    rpc(tclunk(21, 1), rclunk(21), "clunk new file");
    // rights
    ins(inst(8'h82, {8'd7, 8'd1}), E_NONE, "set read-only");
    rpc(twalk(22, 0, 1, "notes"), rwalk(22, qnew), "walk again");
    rpc(topen(23, 1, 1), rerror(23, "perm"), "write open refused");
    rpc(topen(24, 1, 0), ropen(24, qnew, 0), "read open allowed");
    rpc(tclunk(25, 1), rclunk(25), "clunk");
    // delete
    ins(inst(8'h81, raw8("notes")), E_NONE, "delete file");
    rpc(twalk(26, 0, 1, "notes"), rerror(26, "no file"), "deleted file gone");
    ins(inst(8'h81, raw8("notes")), E_NOFILE, "delete missing file");
    // a file stored in two parts (instruction 0x80 twice with one name)
    qnew = styx_tb_pkg::qid(0, 0, 12);
    ins(inst(8'h80, {qnew, raw8("cam"), 8'd10, bytes("0123456789")}), E_NONE, "add part 1");
    ins(inst(8'h80, {qnew, raw8("cam"), 8'd5, bytes("abcde")}), E_NONE, "add part 2");
    rpc(twalk(40, 0, 1, "cam"), rwalk(40, qnew), "walk split file");
    rpc(topen(41, 1, 2), ropen(41, qnew, 0), "open split file");
    rpc(tread(42, 1, 0, 100), rread(42, bytes("0123456789")), "read first part");
    rpc(tread(43, 1, 10, 100), rread(43, bytes("abcde")), "read second part");
    rpc(tread(44, 1, 12, 2), rread(44, bytes("cd")), "read inside second part");
    rpc(tread(45, 1, 15, 100), rread(45, e), "read at end of file");
    rpc(twrite(46, 1, 11, bytes("XYZ")), rwrite(46, 3), "write into second part");
    rpc(twrite(47, 1, 13, bytes("PQR")), rwrite(47, 2), "write stops at the end of the part");
    rpc(tread(48, 1, 10, 100), rread(48, bytes("aXYPQ")), "second part read back");
    rpc(twrite(49, 1, 300, bytes("no")), rwrite(49, 0), "write past the end");
    rpc(tclunk(50, 1), rclunk(50), "clunk split file");
    // no room
    rec = {qnew, raw8("huge"), 8'd255};
    for (int i = 0; i < 255; i++) rec.push_back(8'(i));
    ins(inst(8'h80, rec), E_NONE, "add 255-byte file");
    ins(inst(8'h80, rec), E_NOSPACE, "namespace full");
    // users and verification mode
    ins(inst(8'h83, {8'd1, raw8("bob"), raw8("pw")}), E_NONE, "add user");
    rpc(tattach(27, 5, -1, "bob", ""), rerror(27, "auth"), "password user needs Tauth");
    rpc(tauth(28, 6, "bob", "pw"), rauth(28, styx_tb_pkg::qid(8'h08, 0, 0)), "Tauth");
    rpc(tattach(29, 5, 6, "bob", ""), rattach(29, qroot), "attach after Tauth");
    ins(inst(8'h83, {8'd1}), E_UNSUP, "short user instruction");
    ins(inst(8'h84, {8'h02}), E_NONE, "verification mode");
    chk(verif_mode == 8'h02, "verification mode value");
    ins(inst(8'h9F, {8'h00}), E_UNSUP, "unknown instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
