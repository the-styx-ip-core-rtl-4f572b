// styx_pkg: types and constants shared by the Styx client/server IP-core.
//
// Styx message type codes and the wire layout (size[4] type[1] tag[2] ...,
// all integers little-endian, strings as len[2] + bytes) follow the Styx
// (9P2000) protocol definition. The client instruction codes 0x01..0x07 and
// the server instruction codes 0x80..0x84 follow the core's instruction
// tables. The namespace record layout QID(13) + name(8) + length(1) + data
// follows the hardware namespace definition; the QID is split 9P2000-style
// into type[1], version[4] and path[8]. Error codes, their strings and the
// device numbering are this design's own choices.
package styx_pkg;

  // ---------------- Styx message types ----------------
  localparam logic [7:0] TVERSION = 8'd100;
  localparam logic [7:0] RVERSION = 8'd101;
  localparam logic [7:0] TAUTH    = 8'd102;
  localparam logic [7:0] RAUTH    = 8'd103;
  localparam logic [7:0] TATTACH  = 8'd104;
  localparam logic [7:0] RATTACH  = 8'd105;
  localparam logic [7:0] RERROR   = 8'd107;
  localparam logic [7:0] TWALK    = 8'd110;
  localparam logic [7:0] RWALK    = 8'd111;
  localparam logic [7:0] TOPEN    = 8'd112;
  localparam logic [7:0] ROPEN    = 8'd113;
  localparam logic [7:0] TREAD    = 8'd116;
  localparam logic [7:0] RREAD    = 8'd117;
  localparam logic [7:0] TWRITE   = 8'd118;
  localparam logic [7:0] RWRITE   = 8'd119;
  localparam logic [7:0] TCLUNK   = 8'd120;
  localparam logic [7:0] RCLUNK   = 8'd121;
  localparam logic [7:0] TSTAT    = 8'd124;
  localparam logic [7:0] RSTAT    = 8'd125;

  localparam logic [15:0] NOTAG = 16'hFFFF;
  localparam logic [31:0] NOFID = 32'hFFFF_FFFF;

  // Version string both ends must agree on, "9P2000", 6 characters.
  localparam logic [63:0] STYX_VERSION = 64'h0000_3030_3032_5039; // byte i = char i
  localparam int          STYX_VERSION_LEN = 6;

  // ---------------- instruction codes ----------------
  localparam logic [7:0] INS_TVERSION = 8'h01;
  localparam logic [7:0] INS_TATTACH  = 8'h02;
  localparam logic [7:0] INS_TWALK    = 8'h03;
  localparam logic [7:0] INS_TOPEN    = 8'h04;
  localparam logic [7:0] INS_TREAD    = 8'h05;
  localparam logic [7:0] INS_TWRITE   = 8'h06;
  localparam logic [7:0] INS_TCLUNK   = 8'h07;
  localparam logic [7:0] INS_ADDFILE  = 8'h80;
  localparam logic [7:0] INS_DELFILE  = 8'h81;
  localparam logic [7:0] INS_SETPERM  = 8'h82;
  localparam logic [7:0] INS_SETUSER  = 8'h83;
  localparam logic [7:0] INS_VERIF    = 8'h84;

  // ---------------- namespace records ----------------
  typedef struct packed {
    logic [63:0] path;
    logic [31:0] vers;
    logic [7:0]  qtype;
  } qid_t;                      // 13 bytes; byte 0 (qtype) is sent first

  localparam int QID_BYTES  = 13;
  localparam int NAME_BYTES = 8;
  localparam int REC_HDR    = QID_BYTES + NAME_BYTES + 1;  // 22
  localparam int LEN_OFS    = QID_BYTES + NAME_BYTES;      // 21
  localparam logic [7:0] QT_DIR     = 8'h80;
  localparam logic [7:0] QT_FILE    = 8'h00;
  localparam logic [7:0] QT_DELETED = 8'hFF;  // marks a deleted record

  // names are 8 bytes, byte i at bits [8i+7:8i], zero padded
  typedef logic [63:0] name_t;

  // device numbers (low byte of the QID path)
  localparam logic [7:0] DEV_LEDS   = 8'd1;
  localparam logic [7:0] DEV_SWITCH = 8'd2;
  localparam logic [7:0] DEV_SEG    = 8'd3;
  localparam logic [7:0] DEV_BELL   = 8'd4;

  // namespace control commands
  typedef enum logic [2:0] {
    NS_NOP, NS_FIND, NS_WRITE, NS_APPEND, NS_COMMIT, NS_DELETE
  } ns_cmd_t;

  // access modes (Topen mode, low two bits)
  localparam logic [1:0] OREAD  = 2'd0;
  localparam logic [1:0] OWRITE = 2'd1;
  localparam logic [1:0] ORDWR  = 2'd2;

  // ---------------- errors ----------------
  typedef enum logic [3:0] {
    E_NONE, E_VERSION, E_AUTH, E_NOFILE, E_FID, E_PERM, E_NOSPACE, E_UNSUP, E_NOTOPEN
  } err_t;

  // Error text, 8 bytes max, byte i = char i.
  function automatic logic [63:0] err_text(err_t e);
    case (e)
      E_VERSION: return 64'h00_6E_6F_69_73_72_65_76;  // "version"
      E_AUTH:    return 64'h00_00_00_00_68_74_75_61;  // "auth"
      E_NOFILE:  return 64'h00_65_6C_69_66_20_6F_6E;  // "no file"
      E_FID:     return 64'h00_64_69_66_20_64_61_62;  // "bad fid"
      E_PERM:    return 64'h00_00_00_00_6D_72_65_70;  // "perm"
      E_NOSPACE: return 64'h00_00_00_00_6C_6C_75_66;  // "full"
      E_UNSUP:   return 64'h00_00_00_00_00_00_6F_6E;  // "no"
      E_NOTOPEN: return 64'h6E_65_70_6F_20_74_6F_6E;  // "not open"
      default:   return 64'h0;
    endcase
  endfunction

  function automatic logic [3:0] err_len(err_t e);
    case (e)
      E_VERSION: return 4'd7;
      E_AUTH:    return 4'd4;
      E_NOFILE:  return 4'd7;
      E_FID:     return 4'd7;
      E_PERM:    return 4'd4;
      E_NOSPACE: return 4'd4;
      E_UNSUP:   return 4'd2;
      E_NOTOPEN: return 4'd8;
      default:   return 4'd0;
    endcase
  endfunction

  // byte i of a little-endian value of up to 8 bytes
  function automatic logic [7:0] byte_of(logic [63:0] v, logic [2:0] i);
    return 8'(v >> {i, 3'b000});
  endfunction

  // length of a zero-padded 8-byte string
  function automatic logic [3:0] str_len8(logic [63:0] s);
    logic [3:0] n;
    n = 4'd0;
    for (int i = 0; i < 8; i++)
      if (s[8*i +: 8] != 8'h00) n = 4'(i + 1);
    return n;
  endfunction

  // 7-segment pattern (gfedcba, active high) of a hex digit
  function automatic logic [6:0] hex7(logic [3:0] d);
    case (d)
      4'h0: return 7'h3F; 4'h1: return 7'h06; 4'h2: return 7'h5B; 4'h3: return 7'h4F;
      4'h4: return 7'h66; 4'h5: return 7'h6D; 4'h6: return 7'h7D; 4'h7: return 7'h07;
      4'h8: return 7'h7F; 4'h9: return 7'h6F; 4'hA: return 7'h77; 4'hB: return 7'h7C;
      4'hC: return 7'h39; 4'hD: return 7'h5E; 4'hE: return 7'h79; default: return 7'h71;
    endcase
  endfunction

endpackage
