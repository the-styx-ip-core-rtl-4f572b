// styx_cli_decoder: decoder of the Styx client.
//
// It handles two kinds of transaction, handed over by the core's dispatcher
// with `start` once the first bytes have been read:
//  * an instruction from the CPU or another device (codes 0x01-0x07: one
//    code byte, a two-byte length and that many data bytes). It turns it
//    into commands for the client encoder, which builds the T messages:
//      0x01 Tversion (tag NOTAG, msize MSIZE)     data ignored
//      0x02 Tattach  fid 0, uname = data          (up to 8 characters)
//      0x03 Twalk    fid 0 -> fid 1, one name = data (no data: clone)
//      0x04 Topen    data = mode byte + file name: a Twalk to the name
//                    (if one is given) followed by Topen of fid 1
//      0x05 Tread    fid 1, data = offset byte, count byte
//      0x06 Twrite   fid 1, offset 0, the data field is the payload and
//                    passes from the input buffer to the encoder unstored
//      0x07 Tclunk   fid 1
//    Every message but Tversion takes the next tag of a counter.
//  * an R message from a server (odd type). The tag is read, Rread data is
//    passed out on dat_valid/dat one byte per cycle, everything else is
//    dropped, and the outcome is reported for one cycle on rsp_valid with
//    its type and tag; rsp_err marks an Rerror.
// The data layouts of the instructions, the fixed fids 0 (root) and 1 (the
// open file) and the way outcomes are reported are this design's choices;
// the instruction codes and what each one sends follow the document.
module styx_cli_decoder
  import styx_pkg::*;
#(
  parameter logic [31:0] MSIZE = 32'd512
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the dispatcher
  input  logic        start,
  input  logic        is_inst,
  input  logic [7:0]  code,
  input  logic [15:0] blen,
  output logic        done,
  // input buffer
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_pop,
  // client encoder
  output logic        enc_start,
  output logic [7:0]  enc_type,
  output logic [15:0] enc_tag,
  output logic [31:0] enc_fid,
  output logic [31:0] enc_newfid,
  output logic        enc_nwname,
  output name_t       enc_name,
  output logic [7:0]  enc_mode,
  output logic [7:0]  enc_offset,
  output logic [15:0] enc_count,
  output logic [31:0] enc_msize,
  input  logic        enc_done,
  output logic        enc_dat_valid,
  output logic [7:0]  enc_dat,
  input  logic        enc_dat_take,
  // responses
  output logic        rsp_valid,
  output logic [7:0]  rsp_type,
  output logic [15:0] rsp_tag,
  output logic        rsp_err,
  output logic        dat_valid,
  output logic [7:0]  dat
);
  localparam int BUFN = 9;

  typedef enum logic [2:0] {C_IDLE, C_COLLECT, C_SEND, C_WAIT, C_PASS, C_STREAM, C_FIN} cstate_t;

  cstate_t     state;
  logic        r_inst;
  logic [7:0]  r_code;
  logic [15:0] r_len, r_total;
  logic [3:0]  bi, clen;
  logic [7:0]  fbuf [BUFN];
  logic        second;       // Topen: the Topen after the Twalk
  logic [15:0] tag_ctr;

  function automatic name_t raw_name(int o, logic [15:0] n);
    name_t s;
    s = '0;
    for (int i = 0; i < 8; i++)
      if (o + i < BUFN && 16'(o + i) < n) s[8*i +: 8] = fbuf[o+i];
    return s;
  endfunction

  wire open_walk = (r_code == INS_TOPEN) && (r_total > 16'd1) && !second;

  // encoder command for the current step
  always_comb begin
    enc_fid    = 32'd1;
    enc_newfid = 32'd1;
    enc_nwname = 1'b0;
    enc_name   = '0;
    enc_mode   = fbuf[0];
    enc_offset = fbuf[0];
    enc_count  = {8'd0, fbuf[1]};
    enc_msize  = MSIZE;
    enc_tag    = tag_ctr;
    enc_type   = TCLUNK;
    unique case (r_code)
      INS_TVERSION: begin enc_type = TVERSION; enc_tag = NOTAG; end
      INS_TATTACH:  begin enc_type = TATTACH; enc_fid = 32'd0; enc_name = raw_name(0, r_total); end
      INS_TWALK: begin
        enc_type = TWALK; enc_fid = 32'd0;
        enc_nwname = (r_total != 0);
        enc_name   = raw_name(0, r_total);
      end
      INS_TOPEN: begin
        if (open_walk) begin
          enc_type = TWALK; enc_fid = 32'd0; enc_nwname = 1'b1;
          enc_name = raw_name(1, r_total);
        end else enc_type = TOPEN;
      end
      INS_TREAD:  enc_type = TREAD;
      INS_TWRITE: begin enc_type = TWRITE; enc_offset = 8'd0; enc_count = r_total; end
      default:    enc_type = TCLUNK;
    endcase
  end

  assign enc_start     = (state == C_SEND);
  assign enc_dat_valid = (state == C_PASS) && in_valid && (r_len != 0);
  assign enc_dat       = in_data;

  always_comb begin
    in_pop = 1'b0;
    unique case (state)
      C_COLLECT: in_pop = in_valid && (bi < clen);
      C_PASS:    in_pop = enc_dat_take;
      C_STREAM:  in_pop = in_valid && (r_len != 0);
      default: ;
    endcase
  end

  assign dat_valid = (state == C_STREAM) && in_pop && !r_inst && r_code == RREAD;
  assign dat       = in_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_IDLE; r_inst <= 1'b0; r_code <= '0; r_len <= '0; r_total <= '0;
      bi <= '0; clen <= '0; second <= 1'b0; tag_ctr <= '0; done <= 1'b0;
      rsp_valid <= 1'b0; rsp_type <= '0; rsp_tag <= '0; rsp_err <= 1'b0;
      for (int i = 0; i < BUFN; i++) fbuf[i] <= '0;
    end else begin
      done      <= 1'b0;
      rsp_valid <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          r_inst  <= is_inst;
          r_code  <= code;
          r_len   <= blen;
          r_total <= blen;
          bi      <= '0;
          second  <= 1'b0;
          for (int i = 0; i < BUFN; i++) fbuf[i] <= '0;
          if (is_inst && code == INS_TWRITE) clen <= '0;
          else if (is_inst) clen <= (blen < 16'(BUFN)) ? 4'(blen) : 4'(BUFN);
          else clen <= (blen < 16'd6) ? 4'(blen) : 4'd6;   // tag + 4 bytes
          state <= C_COLLECT;
        end
        C_COLLECT: begin
          if (in_pop) begin
            fbuf[bi] <= in_data;
            bi       <= bi + 1'b1;
            r_len    <= r_len - 1'b1;
          end
          if (bi == clen) begin
            if (!r_inst) state <= C_STREAM;
            else if (r_code >= INS_TVERSION && r_code <= INS_TCLUNK) state <= C_SEND;
            else state <= C_STREAM;                // unknown: drop
          end
        end
        C_SEND: begin
          if (enc_type != TVERSION) tag_ctr <= tag_ctr + 1'b1;
          state <= (r_code == INS_TWRITE) ? C_PASS : C_WAIT;
        end
        C_PASS: begin
          if (in_pop) r_len <= r_len - 1'b1;
          if (enc_done) state <= C_STREAM;
        end
        C_WAIT: if (enc_done) begin
          if (open_walk) begin
            second <= 1'b1;
            state  <= C_SEND;
          end else state <= C_STREAM;
        end
        C_STREAM: begin
          if (in_pop) r_len <= r_len - 1'b1;
          if (r_len == 0) begin
            state <= C_FIN;
            if (!r_inst) begin
              rsp_valid <= 1'b1;
              rsp_type  <= r_code;
              rsp_tag   <= {fbuf[1], fbuf[0]};
              rsp_err   <= (r_code == RERROR);
            end
          end
        end
        C_FIN: begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
