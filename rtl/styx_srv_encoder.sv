// styx_srv_encoder: packet encoder of the Styx server. Builds one Styx reply
// ("R") message and pushes it into the output buffer.
//
// The packet decoder pulses `start` with the reply type and the fields the
// reply needs (tag, error code, QID, a 32-bit value that is msize for
// Rversion, the number of QIDs for Rwalk, iounit for Ropen and the byte count
// for Rread/Rwrite, the file length for Rstat) and, for Rstat, the file
// name. The encoder latches them, works out the message size
// and emits size[4] type[1] tag[2] and the body, one byte per cycle while
// out_ready is high (the output buffer is not full); it stalls otherwise.
// Rread data comes straight from the namespace RAM read port: the read
// address is derived from the index of the byte presented next, so that the
// one-cycle RAM latency costs no cycle and a stall re-reads the same byte.
// An N-byte reply takes N cycles after the start cycle; `done` is pulsed
// with the last byte. Rerror carries a short text chosen by the error code.
// Rstat holds one stat entry with empty uid/gid/muid, zero times and mode
// 0666 for a file, 0755 plus the directory bit for the root.
// The layout of each reply follows Styx (9P2000); Rauth returns the QID given.
module styx_srv_encoder
  import styx_pkg::*;
#(
  parameter int NS_AW = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [7:0]       rtype,
  input  logic [15:0]      tag,
  input  err_t             err,
  input  qid_t             qid,
  input  logic [31:0]      val,
  input  name_t            name,
  input  logic [NS_AW-1:0] rd_rec,
  input  logic [7:0]       rd_base,
  input  logic [7:0]       rd_dev,
  output logic             busy,
  output logic             done,
  // output buffer
  output logic             out_valid,
  output logic [7:0]       out_data,
  input  logic             out_ready,
  // namespace read port
  output logic [NS_AW-1:0] ns_rd_rec,
  output logic [7:0]       ns_rd_off,
  output logic [7:0]       ns_rd_dev,
  input  logic [7:0]       ns_rd_data
);
  logic [7:0]  r_type;
  logic [15:0] r_tag;
  err_t        r_err;
  qid_t        r_qid;
  name_t       r_name;
  logic [31:0] r_val;
  logic [8:0]  idx, size;

  function automatic logic [8:0] msg_size(logic [7:0] t, logic [7:0] v, err_t e, logic [3:0] n);
    case (t)
      RVERSION:         return 9'd7 + 9'd4 + 9'd2 + 9'(STYX_VERSION_LEN);
      RAUTH, RATTACH:   return 9'd7 + 9'(QID_BYTES);
      RWALK:            return v[0] ? 9'd9 + 9'(QID_BYTES) : 9'd9;
      ROPEN:            return 9'd7 + 9'(QID_BYTES) + 9'd4;
      RREAD:            return 9'd11 + {1'b0, v};
      RWRITE:           return 9'd11;
      RERROR:           return 9'd9 + 9'(err_len(e));
      RSTAT:            return 9'd58 + 9'(n);
      RCLUNK:           return 9'd7;
      default:          return 9'd7;
    endcase
  endfunction

  function automatic logic [7:0] qbyte(qid_t q, logic [3:0] b);
    return 8'(q >> {b, 3'b000});
  endfunction

  always_comb begin
    logic [8:0] j;
    logic [2:0] jv;
    logic [1:0] jo;
    logic [3:0] je;
    logic [3:0] jq, nl;
    logic [2:0] jl, jn;
    logic [63:0] et;
    j  = idx - 9'd7;        // body byte index
    jv = 3'(j - 9'd6);      // Rversion: version character
    jo = 2'(j - 9'd13);     // Ropen: iounit byte
    je = 4'(j - 9'd2);      // Rerror: text character / Rwalk: QID byte
    jq = 4'(j - 9'd10);     // Rstat: QID byte
    jl = 3'(j - 9'd35);     // Rstat: length byte
    jn = 3'(j - 9'd45);     // Rstat: name character
    nl = str_len8(r_name);
    et = err_text(r_err);
    out_data = 8'h00;
    if (idx < 9'd4)       out_data = byte_of(64'(size), 3'(idx[1:0])) ;
    else if (idx == 9'd4) out_data = r_type;
    else if (idx == 9'd5) out_data = r_tag[7:0];
    else if (idx == 9'd6) out_data = r_tag[15:8];
    else begin
      case (r_type)
        RVERSION: begin
          if (j < 9'd4)       out_data = byte_of(64'(r_val), 3'(j[1:0]));
          else if (j == 9'd4) out_data = 8'(STYX_VERSION_LEN);
          else if (j == 9'd5) out_data = 8'd0;
          else                out_data = byte_of(64'(STYX_VERSION), 3'(jv[2:0]));
        end
        RAUTH, RATTACH: out_data = qbyte(r_qid, j[3:0]);
        RWALK: begin
          if (j == 9'd0)      out_data = {7'd0, r_val[0]};
          else if (j == 9'd1) out_data = 8'd0;
          else                out_data = qbyte(r_qid, je[3:0]);
        end
        ROPEN: begin
          if (j < 9'd13) out_data = qbyte(r_qid, j[3:0]);
          else           out_data = byte_of(64'(r_val), 3'(jo[1:0]));
        end
        RREAD: begin
          if (j < 9'd4) out_data = byte_of(64'(r_val), 3'(j[1:0]));
          else          out_data = ns_rd_data;
        end
        RWRITE: out_data = byte_of(64'(r_val), 3'(j[1:0]));
        RERROR: begin
          if (j == 9'd0)      out_data = 8'(err_len(r_err));
          else if (j == 9'd1) out_data = 8'd0;
          else                out_data = byte_of(64'(et), 3'(je[2:0]));
        end
        RSTAT: begin
          // nstat[2], then stat: size[2] type[2] dev[4] qid[13] mode[4]
          // atime[4] mtime[4] length[8] name[s] uid[s] gid[s] muid[s]
          if (j == 9'd0)       out_data = 8'd49 + 8'(nl);
          else if (j == 9'd2)  out_data = 8'd47 + 8'(nl);
          else if (j >= 9'd10 && j < 9'd23) out_data = qbyte(r_qid, jq);
          else if (j == 9'd23) out_data = (r_qid.qtype == QT_DIR) ? 8'hED : 8'hB6;  // 0755 / 0666
          else if (j == 9'd24) out_data = 8'h01;
          else if (j == 9'd26) out_data = (r_qid.qtype == QT_DIR) ? 8'h80 : 8'h00;  // DMDIR
          else if (j >= 9'd35 && j < 9'd39) out_data = byte_of(64'(r_val), jl);
          else if (j == 9'd43) out_data = 8'(nl);
          else if (j >= 9'd45 && j < 9'd45 + 9'(nl)) out_data = byte_of(r_name, jn);
          else                 out_data = 8'h00;
        end
        default: out_data = 8'h00;
      endcase
    end
  end

  assign out_valid = busy;
  wire        fire     = busy && out_ready;
  wire [8:0]  idx_next = fire ? idx + 9'd1 : idx;

  assign ns_rd_rec = rd_rec;
  assign ns_rd_dev = rd_dev;
  assign ns_rd_off = rd_base + 8'(idx_next - 9'd11);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      idx    <= '0;
      size   <= '0;
      r_type <= '0;
      r_tag  <= '0;
      r_err  <= E_NONE;
      r_qid  <= '0;
      r_name <= '0;
      r_val  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          idx    <= '0;
          size   <= msg_size(rtype, val[7:0], err, str_len8(name));
          r_name <= name;
          r_type <= rtype;
          r_tag  <= tag;
          r_err  <= err;
          r_qid  <= qid;
          r_val  <= val;
        end
      end else if (fire) begin
        idx <= idx + 9'd1;
        if (idx == size - 9'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
