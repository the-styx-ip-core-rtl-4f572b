// styx_auth: authentication unit of the Styx server.
//
// It answers three questions for the packet decoder, all combinationally:
//  * version_ok: is the version string of a Tversion the server's own
//    ("9P2000")?
//  * user checks: q_user/q_pass are compared with a table of NUSERS
//    user-name/password pairs (8 bytes each, zero padded). pass_ok is set
//    when a valid entry matches both. attach_ok is set when a valid entry
//    matches the name and either its password is empty or that user has
//    already passed a Tauth (mark_auth records that).
//  * perm_ok: may a file with QID path q_path be accessed in mode q_mode?
//    Rights are two bits (bit 0 read, bit 1 write) per file, indexed by the
//    low bits of the path; ORDWR needs both.
// The tables are written through set_user and set_perm, which the decoder
// drives from the "set user names/passwords" and "set file permissions"
// instructions. Checking is plain string comparison without encryption.
// At reset user 0 is DEFAULT_USER with no password and every file has read
// and write rights, so that a stand-alone core without a CPU can be
// mounted; these defaults are this design's choice.
module styx_auth
  import styx_pkg::*;
#(
  parameter int          NUSERS       = 4,
  parameter int          NPERM        = 16,
  parameter logic [63:0] DEFAULT_USER = 64'h00_6F_6E_72_65_66_6E_69  // "inferno"
) (
  input  logic        clk,
  input  logic        rst_n,
  // queries
  input  name_t       q_version,
  output logic        version_ok,
  input  name_t       q_user,
  input  name_t       q_pass,
  output logic        pass_ok,
  output logic        attach_ok,
  input  logic [7:0]  q_path,
  input  logic [1:0]  q_mode,
  output logic        perm_ok,
  // updates
  input  logic        mark_auth,     // q_user/q_pass passed Tauth
  input  logic        set_user,
  input  logic [7:0]  set_user_idx,
  input  name_t       set_user_name,
  input  name_t       set_user_pass,
  input  logic        set_perm,
  input  logic [7:0]  set_perm_path,
  input  logic [1:0]  set_perm_bits
);
  localparam int PW = $clog2(NPERM);

  // only the low PW bits of a QID path select a rights entry
  wire unused_path = &{1'b0, q_path[7:PW], set_perm_path[7:PW]};

  name_t      uname [NUSERS];
  name_t      upass [NUSERS];
  logic [NUSERS-1:0] uvalid, uauthed;
  logic [1:0] perm [NPERM];

  logic [NUSERS-1:0] name_hit, pass_hit;

  always_comb begin
    for (int i = 0; i < NUSERS; i++) begin
      name_hit[i] = uvalid[i] && (uname[i] == q_user);
      pass_hit[i] = name_hit[i] && (upass[i] == q_pass);
    end
  end

  always_comb begin
    logic ok;
    ok = 1'b0;
    for (int i = 0; i < NUSERS; i++)
      if (name_hit[i] && (upass[i] == '0 || uauthed[i])) ok = 1'b1;
    attach_ok = ok;
  end

  assign pass_ok    = |pass_hit;
  assign version_ok = (q_version == STYX_VERSION);

  always_comb begin
    logic [1:0] p;
    p = perm[q_path[PW-1:0]];
    case (q_mode)
      OREAD:   perm_ok = p[0];
      OWRITE:  perm_ok = p[1];
      ORDWR:   perm_ok = &p;
      default: perm_ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUSERS; i++) begin
        uname[i] <= (i == 0) ? DEFAULT_USER : '0;
        upass[i] <= '0;
      end
      uvalid  <= NUSERS'(1);
      uauthed <= '0;
      for (int i = 0; i < NPERM; i++) perm[i] <= 2'b11;
    end else begin
      if (mark_auth) uauthed <= uauthed | pass_hit;
      if (set_user && set_user_idx < 8'(NUSERS)) begin
        uname[set_user_idx[$clog2(NUSERS)-1:0]]   <= set_user_name;
        upass[set_user_idx[$clog2(NUSERS)-1:0]]   <= set_user_pass;
        uvalid[set_user_idx[$clog2(NUSERS)-1:0]]  <= (set_user_name != '0);
        uauthed[set_user_idx[$clog2(NUSERS)-1:0]] <= 1'b0;
      end
      if (set_perm) perm[set_perm_path[PW-1:0]] <= set_perm_bits;
    end
  end
endmodule
