// styx_cli_encoder: packet encoder of the Styx client. Builds one Styx
// request ("T") message and pushes it into the output buffer.
//
// It is driven entirely by the client decoder, which pulses `start` with the
// message type and its fields: tag, fid, newfid, the number of names of a
// walk (0 or 1), a file or user name of up to 8 characters, open mode, read
// offset (one byte: files hold at most 255 bytes), byte count and msize.
// The message is emitted as size[4] type[1] tag[2] body, little-endian,
// one byte per cycle while out_ready is high. Tattach carries afid = NOFID
// and an empty aname. The data of a Twrite is not stored here: it is pulled
// from the input buffer through dat_valid/dat/dat_take as it goes out, so a
// write of any length passes through at one byte per cycle. An N-byte
// message takes N cycles after the start cycle; `done` is pulsed with the
// last byte. Layouts follow Styx (9P2000).
module styx_cli_encoder
  import styx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  ttype,
  input  logic [15:0] tag,
  input  logic [31:0] fid,
  input  logic [31:0] newfid,
  input  logic        nwname,
  input  name_t       name,
  input  logic [7:0]  mode,
  input  logic [7:0]  offset,
  input  logic [15:0] count,
  input  logic [31:0] msize,
  output logic        busy,
  output logic        done,
  // Twrite data source
  input  logic        dat_valid,
  input  logic [7:0]  dat,
  output logic        dat_take,
  // output buffer
  output logic        out_valid,
  output logic [7:0]  out_data,
  input  logic        out_ready
);
  logic [7:0]  r_type;
  logic [15:0] r_tag, r_count;
  logic [31:0] r_fid, r_newfid, r_msize, size;
  logic        r_nw;
  name_t       r_name;
  logic [3:0]  r_nlen;
  logic [7:0]  r_mode, r_off;
  logic [16:0] idx;

  function automatic logic [31:0] msg_size(logic [7:0] t, logic nw, logic [3:0] l, logic [15:0] c);
    case (t)
      TVERSION: return 32'd19;
      TATTACH:  return 32'd19 + 32'(l);
      TWALK:    return nw ? 32'd19 + 32'(l) : 32'd17;
      TOPEN:    return 32'd12;
      TREAD:    return 32'd23;
      TWRITE:   return 32'd23 + 32'(c);
      default:  return 32'd11;     // Tclunk
    endcase
  endfunction

  wire        in_data_phase = (r_type == TWRITE) && (idx >= 17'd23);
  wire [16:0] j  = idx - 17'd7;
  wire [16:0] jn = j - 17'd10;   // name character of Tattach / Twalk
  wire [2:0]  jv = 3'(j - 17'd6);   // version character
  wire [2:0]  jw = 3'(j - 17'd12);  // name character of Twalk

  always_comb begin
    out_data = 8'h00;
    if (idx < 17'd4)       out_data = byte_of(64'(size), 3'(idx[1:0]));
    else if (idx == 17'd4) out_data = r_type;
    else if (idx == 17'd5) out_data = r_tag[7:0];
    else if (idx == 17'd6) out_data = r_tag[15:8];
    else if (j < 17'd4 && r_type != TVERSION) out_data = byte_of(64'(r_fid), 3'(j[1:0]));
    else begin
      case (r_type)
        TVERSION: begin
          if (j < 17'd4)       out_data = byte_of(64'(r_msize), 3'(j[1:0]));
          else if (j == 17'd4) out_data = 8'(STYX_VERSION_LEN);
          else if (j == 17'd5) out_data = 8'd0;
          else                 out_data = byte_of(64'(STYX_VERSION), 3'(jv[2:0]));
        end
        TATTACH: begin
          if (j < 17'd8)       out_data = byte_of(64'(NOFID), 3'(j[1:0]));  // afid
          else if (j == 17'd8) out_data = 8'(r_nlen);
          else if (j == 17'd9) out_data = 8'd0;
          else if (jn < 17'(r_nlen)) out_data = byte_of(64'(r_name), 3'(jn[2:0]));
          else                 out_data = 8'd0;                // empty aname
        end
        TWALK: begin
          if (j < 17'd8)        out_data = byte_of(64'(r_newfid), 3'(j[1:0]));
          else if (j == 17'd8)  out_data = {7'd0, r_nw};
          else if (j == 17'd9)  out_data = 8'd0;
          else if (j == 17'd10) out_data = 8'(r_nlen);
          else if (j == 17'd11) out_data = 8'd0;
          else                  out_data = byte_of(64'(r_name), 3'(jw[2:0]));
        end
        TOPEN: out_data = r_mode;
        TREAD, TWRITE: begin
          if (j == 17'd4)       out_data = r_off;
          else if (j < 17'd12)  out_data = 8'd0;
          else if (j < 17'd16)  out_data = (j[1:0] < 2'd2) ? byte_of(64'(r_count), {2'b00, j[0]}) : 8'd0;
          else                  out_data = dat;
        end
        default: out_data = 8'h00;
      endcase
    end
  end

  assign out_valid = busy && (!in_data_phase || dat_valid);
  wire   fire      = out_valid && out_ready;
  assign dat_take  = fire && in_data_phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; idx <= '0; size <= '0;
      r_type <= '0; r_tag <= '0; r_count <= '0; r_fid <= '0; r_newfid <= '0;
      r_msize <= '0; r_nw <= 1'b0; r_name <= '0; r_nlen <= '0; r_mode <= '0; r_off <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          idx      <= '0;
          size     <= msg_size(ttype, nwname, str_len8(name), count);
          r_type   <= ttype;
          r_tag    <= tag;
          r_fid    <= fid;
          r_newfid <= newfid;
          r_nw     <= nwname;
          r_name   <= name;
          r_nlen   <= str_len8(name);
          r_mode   <= mode;
          r_off    <= offset;
          r_count  <= count;
          r_msize  <= msize;
        end
      end else if (fire) begin
        idx <= idx + 1'b1;
        if (32'(idx) == size - 32'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
