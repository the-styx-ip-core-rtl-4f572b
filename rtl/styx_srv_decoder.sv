// styx_srv_decoder: packet decoder of the Styx server.
//
// The dispatcher of the core reads the first bytes of a transaction and
// hands it over with `start`: either a Styx request ("T" message) with its
// type and body length (size - 5), or a server instruction (codes 0x80-0x84)
// with its data length. The decoder then pops the rest of the bytes from the
// input buffer itself, one per cycle:
//   COLLECT  the fixed fields are gathered into a 32-byte field buffer
//            (all of a short message, the 18 header bytes of a Twrite);
//   EXEC     the request is checked with the authentication unit and the
//            namespace control logic, and the fid table is updated;
//   STREAM   bulk data flows on without buffering: Twrite data goes into
//            the file one byte per cycle, an "add file" record is appended
//            to the namespace one byte per cycle, anything else is dropped;
//   REPLY    the packet encoder is started with the reply (or Rerror) and
//            the decoder waits for it, so that exactly one message is in
//            the core at any time.
// Requests handled: Tversion (version check; clears all fids), Tauth (user
// name + password, the password carried in the aname string), Tattach
// (user must be known and either password-free or authenticated),
// Twalk (clone, or one name from the root: the namespace is one level
// deep), Topen (access-rights check), Tread, Twrite, Tclunk, Tstat (one
// entry: the file, or "/" for the root; no directory listing). Other
// requests get Rerror.
// A file may be stored as several parts, records of the same name added one
// after the other, and is served as one file: a Tread or Twrite whose
// offset lies beyond the first part makes the namespace search for the part
// holding that offset. A reply covers one part at most (a short read or
// write, which Styx clients continue at the next offset), and the length in
// Rstat is that of the first part.
// Instructions: 0x80 add a file or a further part of one (data = the
// record: QID, name, length, contents), 0x81 delete a file with all its
// parts (data = name), 0x82 set rights
// (data = QID path byte, rights bits), 0x83 set a user (data = index,
// 8-byte name, 8-byte password), 0x84 set the on-chip verification mode
// (data = mode byte, kept in verif_mode). Instructions have no reply; a
// failed one leaves its error code in inst_err.
// The data layouts of the instructions, the fid table of NFID entries and
// the error policy are this design's choices; message layouts are Styx's,
// and the splitting of large files into parts follows the document.
// A T message of N bytes is decoded in about N + 3 cycles (plus the name
// search of a Twalk, or the part search of a Tread/Twrite past the first
// part), before the reply is encoded.
module styx_srv_decoder
  import styx_pkg::*;
#(
  parameter int          NFID  = 4,
  parameter int          NS_AW = 9,
  parameter logic [31:0] MSIZE = 32'd512
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the dispatcher
  input  logic             start,
  input  logic             is_inst,
  input  logic [7:0]       code,
  input  logic [15:0]      blen,
  output logic             done,
  // input buffer
  input  logic             in_valid,
  input  logic [7:0]       in_data,
  output logic             in_pop,
  // namespace control logic
  output ns_cmd_t          ns_cmd,
  output logic             ns_valid,
  output name_t            ns_name,
  output logic             ns_seek_en,
  output logic [15:0]      ns_seek,
  input  logic [7:0]       ns_part_off,
  output logic [NS_AW-1:0] ns_rec,
  output logic [8:0]       ns_off,
  output logic [7:0]       ns_wdata,
  output logic [7:0]       ns_dev,
  input  logic             ns_ready,
  input  logic             ns_done,
  input  logic             ns_found,
  input  logic [NS_AW-1:0] ns_rec_o,
  input  qid_t             ns_qid_o,
  input  logic [7:0]       ns_len_o,
  input  logic [NS_AW:0]   ns_free,
  // authentication unit
  output name_t            au_version,
  output name_t            au_user,
  output name_t            au_pass,
  output logic [7:0]       au_path,
  output logic [1:0]       au_mode,
  input  logic             au_version_ok,
  input  logic             au_pass_ok,
  input  logic             au_attach_ok,
  input  logic             au_perm_ok,
  output logic             au_mark,
  output logic             au_set_user,
  output logic [7:0]       au_user_idx,
  output name_t            au_user_name,
  output name_t            au_user_pass,
  output logic             au_set_perm,
  output logic [7:0]       au_perm_path,
  output logic [1:0]       au_perm_bits,
  // packet encoder
  output logic             enc_start,
  output logic [7:0]       enc_type,
  output logic [15:0]      enc_tag,
  output err_t             enc_err,
  output qid_t             enc_qid,
  output logic [31:0]      enc_val,
  output name_t            enc_name,
  output logic [NS_AW-1:0] enc_rd_rec,
  output logic [7:0]       enc_rd_base,
  output logic [7:0]       enc_rd_dev,
  input  logic             enc_done,
  // status
  output logic [7:0]       verif_mode,
  output err_t             inst_err
);
  localparam int BUFN = 32;
  localparam int FW   = (NFID > 1) ? $clog2(NFID) : 1;

  typedef enum logic [3:0] {
    D_IDLE, D_COLLECT, D_EXEC, D_FIND, D_STREAM, D_COMMIT, D_REPLY, D_WAITENC, D_FIN
  } dstate_t;
  typedef enum logic [1:0] {SM_DRAIN, SM_WRITE, SM_APPEND} smode_t;

  typedef struct packed {
    logic             valid;
    logic             root;
    logic             opened;
    logic [1:0]       mode;
    logic [31:0]      fid;
    logic [NS_AW-1:0] rec;
    logic [7:0]       len;
    qid_t             qid;
    name_t            name;
  } fid_ent_t;

  dstate_t     state;
  smode_t      smode;
  logic        r_inst;
  logic [7:0]  r_code;
  logic [15:0] r_len;      // body bytes still to pop
  logic [15:0] r_total;    // body length
  logic [5:0]  bi;         // bytes collected
  logic [5:0]  clen;       // bytes to collect
  logic [7:0]  fbuf [BUFN];
  fid_ent_t    fids [NFID];

  // streaming state
  logic [8:0]  sp;         // stream position
  logic        wr_ok;
  logic [7:0]  wr_cnt;
  logic        seekf;      // Tread/Twrite beyond the first part: part search
  logic        del_any;    // a delete instruction has removed a part
  logic [NS_AW-1:0] p_rec; // part written by a Twrite, its length and
  logic [7:0]  p_len;      // the offset of the first byte within it
  logic [7:0]  p_base;

  // reply registers
  logic [7:0]       rep_type;
  err_t             rep_err;
  qid_t             rep_qid;
  logic [31:0]      rep_val;
  name_t            rep_name;
  logic [NS_AW-1:0] rep_rec;
  logic [7:0]       rep_base;
  logic [7:0]       rep_dev;

  // ---------------- field extraction ----------------
  function automatic logic [15:0] f16(int o);
    return {fbuf[o+1], fbuf[o]};
  endfunction
  function automatic logic [31:0] f32(int o);
    return {fbuf[o+3], fbuf[o+2], fbuf[o+1], fbuf[o]};
  endfunction

  // Styx string (len[2] + chars) at byte offset o of the field buffer,
  // returned zero padded; ok is low if it is longer than 8 characters or
  // runs past the collected bytes.
  function automatic logic [64:0] fstr(logic [5:0] o, logic [5:0] have);
    logic [15:0] l;
    logic [63:0] s;
    logic        ok;
    l  = {fbuf[5'(o + 6'd1)], fbuf[o[4:0]]};
    s  = '0;
    ok = (l <= 16'd8) && (7'(o) + 7'd2 + 7'(l[3:0]) <= 7'(have));
    for (int i = 0; i < 8; i++)
      if (4'(i) < l[3:0] && l <= 16'd8) s[8*i +: 8] = fbuf[5'(o + 6'd2 + 6'(i))];
    return {ok, s};
  endfunction

  // raw 8-byte name at offset o (instruction data)
  function automatic name_t fraw(int o);
    name_t s;
    for (int i = 0; i < 8; i++) s[8*i +: 8] = fbuf[o+i];
    return s;
  endfunction

  // ---------------- fid table lookups ----------------
  logic [31:0]  q_fid, q_newfid;
  logic         fid_hit, newfid_hit, free_hit;
  logic [FW-1:0] fid_idx, newfid_idx, free_idx;

  always_comb begin
    fid_hit = 1'b0; newfid_hit = 1'b0; free_hit = 1'b0;
    fid_idx = '0;   newfid_idx = '0;   free_idx = '0;
    for (int i = NFID - 1; i >= 0; i--) begin
      if (fids[i].valid && fids[i].fid == q_fid)    begin fid_hit = 1'b1;    fid_idx = FW'(i);    end
      if (fids[i].valid && fids[i].fid == q_newfid) begin newfid_hit = 1'b1; newfid_idx = FW'(i); end
      if (!fids[i].valid)                            begin free_hit = 1'b1;   free_idx = FW'(i);   end
    end
  end

  // message fields (valid in EXEC, offsets include the 2 tag bytes)
  logic [15:0] tag;
  logic [64:0] s_a, s_b;      // first and second string of the message
  fid_ent_t    fe;            // entry of q_fid
  logic [15:0] nwname;
  logic [31:0] rd_count;
  logic [8:0]  avail;

  always_comb begin
    tag      = f16(0);
    q_fid    = f32(2);
    q_newfid = f32(6);
    nwname   = f16(10);
    s_a      = '0;
    s_b      = '0;
    unique case (r_code)
      TVERSION: s_a = fstr(6'd6, clen);
      TAUTH: begin
        s_a = fstr(6'd6, clen);
        s_b = fstr(6'd8 + {2'b0, str_len8(s_a[63:0])}, clen);
      end
      TATTACH: begin
        s_a = fstr(6'd10, clen);
        s_b = fstr(6'd12 + {2'b0, str_len8(s_a[63:0])}, clen);
      end
      TWALK:   s_a = fstr(6'd12, clen);
      default: ;
    endcase
    fe       = fids[fid_idx];
    rd_count = f32(14);
    // bytes of the file from the requested offset on
    avail    = (f32(10) == 0 && f16(8) == 0 && fbuf[7] == 8'd0 && fbuf[6] < fe.len)
               ? 9'(fe.len) - 9'(fbuf[6]) : 9'd0;
  end

  // A Tread/Twrite whose offset lies past the first part of the file (but
  // below 64 KiB) needs a part search in the namespace.
  wire off16 = (f32(10) == 0 && f16(8) == 0);
  wire need_seek = !r_inst && fid_hit && fe.opened && off16 && (f16(6) >= 16'(fe.len)) &&
                   ((r_code == TREAD  && fe.mode != OWRITE) ||
                    (r_code == TWRITE && fe.mode != OREAD));

  // authentication queries
  always_comb begin
    au_version = s_a[63:0];
    au_user    = s_a[63:0];
    au_pass    = s_b[63:0];
    au_path    = r_inst ? fbuf[0] : fe.qid.path[7:0];
    au_mode    = fbuf[6][1:0];
  end

  assign au_set_user  = (state == D_EXEC) && r_inst && r_code == INS_SETUSER && r_total >= 16'd17;
  assign au_user_idx  = fbuf[0];
  assign au_user_name = fraw(1);
  assign au_user_pass = fraw(9);
  assign au_set_perm  = (state == D_EXEC) && r_inst && r_code == INS_SETPERM && r_total >= 16'd2;
  assign au_perm_path = fbuf[0];
  assign au_perm_bits = fbuf[1][1:0];
  assign au_mark      = (state == D_EXEC) && !r_inst && r_code == TAUTH && au_pass_ok && s_a[64] && s_b[64];

  // ---------------- input buffer and namespace port ----------------
  always_comb begin
    in_pop   = 1'b0;
    ns_valid = 1'b0;
    ns_cmd   = NS_NOP;
    ns_name  = r_inst ? fraw(0) : (need_seek ? fe.name : s_a[63:0]);
    ns_seek_en = need_seek;
    ns_seek  = f16(6);
    ns_rec   = fe.rec;
    ns_off   = sp;
    ns_wdata = in_data;
    ns_dev   = fe.qid.path[7:0];
    unique case (state)
      D_COLLECT: in_pop = in_valid && (bi < clen);
      D_STREAM: begin
        in_pop = in_valid && (r_len != 0);
        if (in_valid && r_len != 0) begin
          if (smode == SM_WRITE && wr_ok && (9'(p_base) + sp) < 9'(p_len)) begin
            ns_valid = 1'b1;
            ns_cmd   = NS_WRITE;
            ns_rec   = p_rec;
            ns_off   = 9'(p_base) + sp;
          end else if (smode == SM_APPEND) begin
            ns_valid = 1'b1;
            ns_cmd   = NS_APPEND;
          end
        end
      end
      D_EXEC: if (ns_ready) begin
        if ((!r_inst && r_code == TWALK && nwname == 16'd1 && fid_hit && fe.root && s_a[64] &&
             (!newfid_hit || newfid_idx == fid_idx) && (free_hit || newfid_hit)) ||
            (r_inst && r_code == INS_DELFILE) || need_seek) begin
          ns_valid = 1'b1;
          ns_cmd   = NS_FIND;
        end
      end
      D_FIND: if (ns_done && ns_found && r_inst) begin
        ns_valid = 1'b1;
        ns_cmd   = NS_DELETE;
        ns_rec   = ns_rec_o;
      end
      D_COMMIT: begin
        ns_valid = 1'b1;
        ns_cmd   = NS_COMMIT;
        ns_off   = 9'(r_total);
      end
      default: ;
    endcase
  end

  // ---------------- encoder port ----------------
  assign enc_start   = (state == D_REPLY);
  assign enc_type    = rep_type;
  assign enc_tag     = tag;
  assign enc_err     = rep_err;
  assign enc_qid     = rep_qid;
  assign enc_val     = rep_val;
  assign enc_name    = rep_name;
  assign enc_rd_rec  = rep_rec;
  assign enc_rd_base = rep_base;
  assign enc_rd_dev  = rep_dev;

  // ---------------- control ----------------
  // reply with an error
  task automatic fail(input err_t e);
    rep_type <= RERROR;
    rep_err  <= e;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      smode      <= SM_DRAIN;
      r_inst     <= 1'b0;
      r_code     <= '0;
      r_len      <= '0;
      r_total    <= '0;
      bi         <= '0;
      clen       <= '0;
      sp         <= '0;
      wr_ok      <= 1'b0;
      wr_cnt     <= '0;
      seekf      <= 1'b0;
      del_any    <= 1'b0;
      p_rec      <= '0;
      p_len      <= '0;
      p_base     <= '0;
      done       <= 1'b0;
      rep_type   <= '0;
      rep_err    <= E_NONE;
      rep_qid    <= '0;
      rep_val    <= '0;
      rep_name   <= '0;
      rep_rec    <= '0;
      rep_base   <= '0;
      rep_dev    <= '0;
      verif_mode <= '0;
      inst_err   <= E_NONE;
      for (int i = 0; i < BUFN; i++) fbuf[i] <= '0;
      for (int i = 0; i < NFID; i++) fids[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          r_inst  <= is_inst;
          r_code  <= code;
          r_total <= blen;
          r_len   <= blen;
          bi      <= '0;
          sp      <= '0;
          wr_ok   <= 1'b0;
          wr_cnt  <= '0;
          seekf   <= 1'b0;
          del_any <= 1'b0;
          smode   <= SM_DRAIN;
          for (int i = 0; i < BUFN; i++) fbuf[i] <= '0;
          // how many bytes go to the field buffer
          if (is_inst && code == INS_ADDFILE) clen <= '0;
          else if (!is_inst && code == TWRITE) clen <= (blen < 16'd18) ? 6'(blen) : 6'd18;
          else clen <= (blen < 16'(BUFN)) ? 6'(blen) : 6'(BUFN);
          state <= D_COLLECT;
        end

        D_COLLECT: begin
          if (in_pop) begin
            fbuf[bi[4:0]] <= in_data;
            bi    <= bi + 1'b1;
            r_len <= r_len - 1'b1;
          end
          if (bi == clen) state <= D_EXEC;
        end

        D_EXEC: if (ns_ready) begin
          state    <= D_STREAM;     // default: drain what is left, then reply
          rep_type <= r_code + 8'd1;
          rep_err  <= E_NONE;
          rep_val  <= '0;
          if (r_inst) begin
            inst_err <= E_NONE;
            unique case (r_code)
              INS_ADDFILE: begin
                if ({16'd0, r_total} <= 32'(ns_free) && r_total >= 16'(REC_HDR)) smode <= SM_APPEND;
                else inst_err <= E_NOSPACE;
              end
              INS_DELFILE: state <= D_FIND;
              INS_SETPERM: if (r_total < 16'd2) inst_err <= E_UNSUP;
              INS_SETUSER: if (r_total < 16'd17) inst_err <= E_UNSUP;
              INS_VERIF:   verif_mode <= fbuf[0];
              default:     inst_err <= E_UNSUP;
            endcase
          end else begin
            unique case (r_code)
              TVERSION: begin
                if (s_a[64] && au_version_ok) begin
                  rep_val <= (f32(2) < MSIZE) ? f32(2) : MSIZE;
                  for (int i = 0; i < NFID; i++) fids[i].valid <= 1'b0;
                end else fail(E_VERSION);
              end
              TAUTH: begin
                if (s_a[64] && s_b[64] && au_pass_ok) begin
                  rep_qid <= '{path: 64'd0, vers: 32'd0, qtype: 8'h08};
                end else fail(E_AUTH);
              end
              TATTACH: begin
                if (!(s_a[64] && au_attach_ok)) fail(E_AUTH);
                else if (fid_hit || !free_hit) fail(E_FID);
                else begin
                  fids[free_idx] <= '{valid: 1'b1, root: 1'b1, opened: 1'b0, mode: 2'd0,
                                      fid: q_fid, rec: '0, len: 8'd0,
                                      qid: '{path: 64'd0, vers: 32'd0, qtype: QT_DIR}, name: '0};
                  rep_qid <= '{path: 64'd0, vers: 32'd0, qtype: QT_DIR};
                end
              end
              TWALK: begin
                if (!fid_hit || fe.opened) fail(E_FID);
                else if (newfid_hit && newfid_idx != fid_idx) fail(E_FID);
                else if (nwname == 16'd0) begin
                  // clone fid into newfid
                  if (newfid_hit) ;
                  else if (free_hit) begin
                    fids[free_idx]     <= fe;
                    fids[free_idx].fid <= q_newfid;
                  end else fail(E_FID);
                  rep_val <= 32'd0;
                end else if (nwname == 16'd1 && fe.root && s_a[64]) begin
                  if (free_hit || newfid_hit) state <= D_FIND;
                  else fail(E_FID);
                end else fail(E_NOFILE);
              end
              TOPEN: begin
                if (!fid_hit || fe.opened) fail(E_FID);
                else if (fe.root) fail(E_UNSUP);
                else if (!au_perm_ok) fail(E_PERM);
                else begin
                  fids[fid_idx].opened <= 1'b1;
                  fids[fid_idx].mode   <= fbuf[6][1:0];
                  rep_qid <= fe.qid;
                  rep_val <= 32'd0;          // iounit: no limit given
                end
              end
              TREAD: begin
                if (!fid_hit) fail(E_FID);
                else if (!fe.opened || fe.mode == OWRITE) fail(E_NOTOPEN);
                else if (need_seek) begin
                  state <= D_FIND;
                  seekf <= 1'b1;
                end else begin
                  rep_val  <= (rd_count < 32'(avail)) ? rd_count : 32'(avail);
                  rep_rec  <= fe.rec;
                  rep_base <= fbuf[6];
                  rep_dev  <= fe.qid.path[7:0];
                end
              end
              TWRITE: begin
                smode <= SM_WRITE;
                if (!fid_hit) fail(E_FID);
                else if (!fe.opened || fe.mode == OREAD) fail(E_NOTOPEN);
                else if (need_seek) begin
                  state <= D_FIND;
                  seekf <= 1'b1;
                end else begin
                  wr_ok  <= off16 && fbuf[7] == 8'd0;
                  p_rec  <= fe.rec;
                  p_len  <= fe.len;
                  p_base <= fbuf[6];
                end
              end
              TCLUNK: begin
                if (!fid_hit) fail(E_FID);
                else fids[fid_idx].valid <= 1'b0;
              end
              TSTAT: begin
                if (!fid_hit) fail(E_FID);
                else begin
                  rep_qid  <= fe.qid;
                  rep_val  <= {24'd0, fe.len};
                  rep_name <= fe.root ? 64'h2F : fe.name;      // "/" for the root
                end
              end
              default: fail(E_UNSUP);
            endcase
          end
        end

        D_FIND: if (ns_done) begin
          state <= D_STREAM;
          if (r_inst) begin
            // delete every part of the file: search again after each one
            if (ns_found) begin
              del_any <= 1'b1;
              state   <= D_EXEC;
            end else if (!del_any) inst_err <= E_NOFILE;
          end else if (seekf) begin
            // part holding the requested offset; none: end of file
            if (r_code == TREAD) begin
              rep_val  <= ns_found ? ((rd_count < 32'(ns_len_o - ns_part_off)) ? rd_count
                                                                                : 32'(ns_len_o - ns_part_off))
                                   : 32'd0;
              rep_rec  <= ns_rec_o;
              rep_base <= ns_part_off;
              rep_dev  <= fe.qid.path[7:0];
            end else begin
              wr_ok  <= ns_found;
              p_rec  <= ns_rec_o;
              p_len  <= ns_len_o;
              p_base <= ns_part_off;
            end
          end else if (!ns_found) fail(E_NOFILE);
          else begin
            fids[newfid_hit ? newfid_idx : free_idx] <=
              '{valid: 1'b1, root: 1'b0, opened: 1'b0, mode: 2'd0, fid: q_newfid,
                rec: ns_rec_o, len: ns_len_o, qid: ns_qid_o, name: s_a[63:0]};
            rep_qid <= ns_qid_o;
            rep_val <= 32'd1;
          end
        end

        D_STREAM: begin
          if (in_pop) begin
            r_len <= r_len - 1'b1;
            sp    <= sp + 1'b1;
            if (ns_valid && ns_cmd == NS_WRITE) wr_cnt <= wr_cnt + 1'b1;
          end
          if (r_len == 0) begin
            if (r_inst) state <= (smode == SM_APPEND) ? D_COMMIT : D_FIN;
            else begin
              state <= D_REPLY;
              if (r_code == TWRITE && rep_type == RWRITE) rep_val <= {24'd0, wr_cnt};
            end
          end
        end

        D_COMMIT:  state <= D_FIN;
        D_REPLY:   state <= D_WAITENC;
        D_WAITENC: if (enc_done) state <= D_FIN;
        D_FIN: begin
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
