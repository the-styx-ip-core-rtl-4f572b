// styx_core: the combined Styx client/server IP-core.
//
// One core serves both roles: it answers Styx requests from remote clients
// out of its own namespace (server) and turns instructions from the local
// CPU or devices into Styx requests to remote servers (client). It sits on
// the system bus as a slave with four byte registers:
//   addr 0  write: next byte of a Styx message from the network
//           read:  next byte of a generated message (pops the output buffer)
//   addr 1  write: next byte of an instruction (code, length[2], data)
//           read:  status {2'b0, rsp_pending, rsp_err, out_avail,
//                          inst_full, msg_full, busy}
//   addr 2  read:  type of the last R message received by the client
//                  (clears rsp_pending)
//   addr 3  read:  error code of the last server instruction
// Bus accesses take effect in the cycle they are presented (bus_we or
// bus_re high); read data is combinational. msg_ready and out_avail are
// also brought out as signals so that a network interface can move bytes
// without polling.
//
// Inside, a dispatcher takes one transaction at a time from the input
// buffer (instructions first): it reads an instruction's code and length,
// or a message's size and type, and hands the rest to one decoder: server
// instructions (0x80 and up) and T messages (even types) to the server
// decoder, client instructions (below 0x80) and R messages (odd types) to
// the client decoder. It waits for that decoder to finish, including the
// reply it has the encoder build, before taking the next one, so only one
// message is handled at any time. The server's packet encoder and the
// client's encoder share the output buffer, which only the active one
// writes. The namespace (with its device control logic) and the
// authentication unit belong to the server side.
module styx_core
  import styx_pkg::*;
#(
  parameter int          BUF_DEPTH = 64,
  parameter int          NS_BYTES  = 512,
  parameter int          NFID      = 4,
  parameter int          NUSERS    = 4,
  parameter logic [31:0] MSIZE     = 32'd512,
  parameter bit          PRELOAD   = 1'b1,
  localparam int NS_AW = $clog2(NS_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  // system bus slave
  input  logic [1:0]  bus_addr,
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [7:0]  bus_wdata,
  output logic [7:0]  bus_rdata,
  output logic        msg_ready,
  output logic        out_avail,
  // client results
  output logic        cl_rsp_valid,
  output logic [7:0]  cl_rsp_type,
  output logic [15:0] cl_rsp_tag,
  output logic        cl_rsp_err,
  output logic        cl_dat_valid,
  output logic [7:0]  cl_dat,
  // devices
  output logic [7:0]  leds,
  input  logic [7:0]  switches,
  output logic [6:0]  seg_lo,
  output logic [6:0]  seg_hi,
  output logic        bell,
  output logic [7:0]  verif_mode
);
  // ---------------- input buffer ----------------
  logic       msg_full, inst_full, msg_empty, inst_empty;
  logic       sel, in_rd, in_valid;
  logic [7:0] in_data;

  styx_in_buf #(.DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .rst_n,
    .msg_wr  (bus_we && bus_addr == 2'd0),
    .inst_wr (bus_we && bus_addr == 2'd1),
    .wdata   (bus_wdata),
    .msg_full, .inst_full, .msg_empty, .inst_empty,
    .sel, .rd_en(in_rd), .rd_valid(in_valid), .rd_data(in_data)
  );

  // ---------------- dispatcher ----------------
  typedef enum logic [2:0] {P_IDLE, P_HDR, P_START, P_BUSY} pstate_t;
  pstate_t     pstate;
  logic [2:0]  hk;          // header bytes read
  logic [31:0] hsize;
  logic [7:0]  hcode;
  logic [15:0] hlen;
  logic        to_srv;
  logic        srv_done, cli_done, srv_pop, cli_pop;
  logic        busy;

  wire [2:0] hdr_bytes = sel ? 3'd3 : 3'd5;
  wire       hdr_pop   = (pstate == P_HDR) && in_valid;

  always_comb begin
    in_rd = 1'b0;
    if (pstate == P_HDR)       in_rd = in_valid;
    else if (pstate == P_BUSY) in_rd = to_srv ? srv_pop : cli_pop;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pstate <= P_IDLE; sel <= 1'b0; hk <= '0; hsize <= '0; hcode <= '0; hlen <= '0; to_srv <= 1'b0;
    end else begin
      unique case (pstate)
        P_IDLE: begin
          hk <= '0;
          if (!inst_empty)     begin sel <= 1'b1; pstate <= P_HDR; end
          else if (!msg_empty) begin sel <= 1'b0; pstate <= P_HDR; end
        end
        P_HDR: if (hdr_pop) begin
          hk <= hk + 1'b1;
          if (sel) begin
            if (hk == 3'd0) hcode <= in_data;
            else if (hk == 3'd1) hlen[7:0] <= in_data;
            else hlen[15:8] <= in_data;
          end else begin
            if (hk < 3'd4) hsize <= {in_data, hsize[31:8]};   // little-endian
            else hcode <= in_data;
          end
          if (hk == hdr_bytes - 3'd1) pstate <= P_START;
        end
        P_START: begin
          if (sel) to_srv <= hcode[7];
          else begin
            to_srv <= !hcode[0];
            hlen   <= (hsize < 32'd5) ? 16'd0 : 16'(hsize - 32'd5);
          end
          pstate <= P_BUSY;
        end
        P_BUSY: if (to_srv ? srv_done : cli_done) pstate <= P_IDLE;
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // one-cycle start pulse, one cycle after P_START so that hlen/to_srv are set
  logic go;
  always_ff @(posedge clk) begin
    if (!rst_n) go <= 1'b0;
    else        go <= (pstate == P_START);
  end

  assign busy = (pstate != P_IDLE);

  // ---------------- output buffer ----------------
  logic       out_full, out_empty, out_wr;
  logic [7:0] out_wdata, out_rdata;
  logic       s_out_valid, c_out_valid;
  logic [7:0] s_out_data, c_out_data;
  logic [$clog2(BUF_DEPTH+1)-1:0] out_cnt;

  assign out_wr    = s_out_valid || c_out_valid;
  assign out_wdata = s_out_valid ? s_out_data : c_out_data;

  styx_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_outbuf (
    .clk, .rst_n, .wr_en(out_wr), .wr_data(out_wdata),
    .rd_en(bus_re && bus_addr == 2'd0), .rd_data(out_rdata),
    .empty(out_empty), .full(out_full), .count(out_cnt)
  );

  assign msg_ready = !msg_full;
  assign out_avail = !out_empty;

  // ---------------- server ----------------
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
  logic [7:0]       au_path, au_user_idx, au_perm_path, enc_type;
  logic [1:0]       au_mode, au_perm_bits;
  logic             au_version_ok, au_pass_ok, au_attach_ok, au_perm_ok, au_mark, au_set_user, au_set_perm;
  logic             enc_start, enc_done, enc_busy;
  logic [15:0]      enc_tag;
  err_t             enc_err, inst_err;
  logic [31:0]      enc_val;
  name_t            enc_name;

  styx_srv_decoder #(.NFID(NFID), .NS_AW(NS_AW), .MSIZE(MSIZE)) u_sdec (
    .clk, .rst_n,
    .start(go && to_srv), .is_inst(sel), .code(hcode), .blen(hlen), .done(srv_done),
    .in_valid, .in_data, .in_pop(srv_pop),
    .ns_cmd, .ns_valid, .ns_name, .ns_seek_en, .ns_seek, .ns_part_off, .ns_rec, .ns_off, .ns_wdata, .ns_dev,
    .ns_ready, .ns_done, .ns_found, .ns_rec_o, .ns_qid_o, .ns_len_o, .ns_free,
    .au_version, .au_user, .au_pass, .au_path, .au_mode,
    .au_version_ok, .au_pass_ok, .au_attach_ok, .au_perm_ok,
    .au_mark, .au_set_user, .au_user_idx, .au_user_name, .au_user_pass,
    .au_set_perm, .au_perm_path, .au_perm_bits,
    .enc_start, .enc_type, .enc_tag, .enc_err, .enc_qid, .enc_val, .enc_name,
    .enc_rd_rec, .enc_rd_base, .enc_rd_dev, .enc_done,
    .verif_mode, .inst_err
  );

  styx_auth #(.NUSERS(NUSERS)) u_auth (
    .clk, .rst_n,
    .q_version(au_version), .version_ok(au_version_ok),
    .q_user(au_user), .q_pass(au_pass), .pass_ok(au_pass_ok), .attach_ok(au_attach_ok),
    .q_path(au_path), .q_mode(au_mode), .perm_ok(au_perm_ok),
    .mark_auth(au_mark),
    .set_user(au_set_user), .set_user_idx(au_user_idx),
    .set_user_name(au_user_name), .set_user_pass(au_user_pass),
    .set_perm(au_set_perm), .set_perm_path(au_perm_path), .set_perm_bits(au_perm_bits)
  );

  styx_namespace #(.NS_BYTES(NS_BYTES), .PRELOAD(PRELOAD)) u_ns (
    .clk, .rst_n,
    .cmd(ns_cmd), .cmd_valid(ns_valid), .ready(ns_ready), .done(ns_done),
    .name(ns_name), .seek_en(ns_seek_en), .seek(ns_seek), .part_off(ns_part_off), .rec(ns_rec), .off(ns_off), .wdata(ns_wdata), .dev(ns_dev),
    .found(ns_found), .rec_o(ns_rec_o), .qid_o(ns_qid_o), .len_o(ns_len_o),
    .free_bytes(ns_free),
    .rd_rec(ns_rd_rec), .rd_off(ns_rd_off), .rd_dev(ns_rd_dev), .rd_data(ns_rd_data),
    .leds, .switches, .seg_lo, .seg_hi, .bell
  );

  styx_srv_encoder #(.NS_AW(NS_AW)) u_senc (
    .clk, .rst_n,
    .start(enc_start), .rtype(enc_type), .tag(enc_tag), .err(enc_err), .qid(enc_qid),
    .val(enc_val), .name(enc_name), .rd_rec(enc_rd_rec), .rd_base(enc_rd_base), .rd_dev(enc_rd_dev),
    .busy(enc_busy), .done(enc_done),
    .out_valid(s_out_valid), .out_data(s_out_data), .out_ready(!out_full),
    .ns_rd_rec, .ns_rd_off, .ns_rd_dev, .ns_rd_data
  );

  // ---------------- client ----------------
  logic        c_start, c_done, c_busy, c_nw, c_dvalid, c_dtake;
  logic [7:0]  c_type, c_mode, c_off, c_dat;
  logic [15:0] c_tag, c_count;
  logic [31:0] c_fid, c_newfid, c_msize;
  name_t       c_name;

  styx_cli_decoder #(.MSIZE(MSIZE)) u_cdec (
    .clk, .rst_n,
    .start(go && !to_srv), .is_inst(sel), .code(hcode), .blen(hlen), .done(cli_done),
    .in_valid, .in_data, .in_pop(cli_pop),
    .enc_start(c_start), .enc_type(c_type), .enc_tag(c_tag), .enc_fid(c_fid),
    .enc_newfid(c_newfid), .enc_nwname(c_nw), .enc_name(c_name), .enc_mode(c_mode),
    .enc_offset(c_off), .enc_count(c_count), .enc_msize(c_msize), .enc_done(c_done),
    .enc_dat_valid(c_dvalid), .enc_dat(c_dat), .enc_dat_take(c_dtake),
    .rsp_valid(cl_rsp_valid), .rsp_type(cl_rsp_type), .rsp_tag(cl_rsp_tag), .rsp_err(cl_rsp_err),
    .dat_valid(cl_dat_valid), .dat(cl_dat)
  );

  styx_cli_encoder u_cenc (
    .clk, .rst_n,
    .start(c_start), .ttype(c_type), .tag(c_tag), .fid(c_fid), .newfid(c_newfid),
    .nwname(c_nw), .name(c_name), .mode(c_mode), .offset(c_off), .count(c_count),
    .msize(c_msize), .busy(c_busy), .done(c_done),
    .dat_valid(c_dvalid), .dat(c_dat), .dat_take(c_dtake),
    .out_valid(c_out_valid), .out_data(c_out_data), .out_ready(!out_full)
  );

  // ---------------- status registers ----------------
  logic       rsp_pend, rsp_errq;
  logic [7:0] rsp_typeq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_pend <= 1'b0; rsp_errq <= 1'b0; rsp_typeq <= '0;
    end else begin
      if (bus_re && bus_addr == 2'd2) rsp_pend <= 1'b0;
      if (cl_rsp_valid) begin
        rsp_pend  <= 1'b1;
        rsp_errq  <= cl_rsp_err;
        rsp_typeq <= cl_rsp_type;
      end
    end
  end

  always_comb begin
    unique case (bus_addr)
      2'd0: bus_rdata = out_rdata;
      2'd1: bus_rdata = {2'b00, rsp_pend, rsp_errq, out_avail, inst_full, msg_full, busy};
      2'd2: bus_rdata = rsp_typeq;
      default: bus_rdata = {4'd0, inst_err};
    endcase
  end

  wire unused = ^{out_cnt, enc_busy, c_busy};

`ifndef SYNTHESIS
  // only the active encoder writes the output buffer
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(s_out_valid && c_out_valid));
`endif
endmodule
