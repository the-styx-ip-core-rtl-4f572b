// styx_namespace: namespace control logic of the Styx server, with the
// namespace RAM and the device control logic inside it.
//
// The namespace is one level deep: every file is a direct child of the root
// and is stored as a record  QID(13) | name(8) | length(1) | data(length)
// packed back to back from address 0 of a NS_BYTES RAM (512 by default).
// A file holds at most 255 bytes (the length field is one byte). Records are
// appended at a free pointer; deleting one overwrites its QID type byte with
// 0xFF so that searches skip it (its space is not reused; this, and fixed
// file capacity set when the file is added, are this design's choices).
//
// Command port (packet decoder), taken when cmd_valid and ready:
//   NS_FIND    search the records for `name`; busy for 24 cycles per record
//              looked at, then a one-cycle `done` with found, rec_o (record
//              address), qid_o and len_o. A file may be stored as several
//              parts (records of the same name, in the order they were
//              added) that together form one file. With seek_en the search
//              looks for the part holding byte `seek` of the whole file:
//              the lengths of earlier parts are subtracted on the way, and
//              part_off is the offset of that byte within the part found.
//   NS_WRITE   write data byte `wdata` at offset `off` of record `rec`
//              (one cycle, streaming); `dev` is the file's device number
//              and is passed to the device control logic.
//   NS_APPEND  write byte `wdata` at free pointer + `off` (building a new
//              record one byte per cycle).
//   NS_COMMIT  add `off` bytes to the free pointer (the record is now live).
//   NS_DELETE  mark the record at `rec` deleted.
// free_bytes tells the decoder how much room is left.
// Read port (packet encoder): byte rd_off of the data of record rd_rec is
// returned on rd_data one cycle later; reads of a device-backed file may be
// answered by the device control logic instead of the RAM.
// With PRELOAD=1 a reset first writes four device files (leds, switches,
// segment, bell; one data byte each, QID paths 1 to 4), taking 92 cycles
// with ready low, so that a stand-alone core serves the board's devices.
module styx_namespace
  import styx_pkg::*;
#(
  parameter int NS_BYTES = 512,
  parameter bit PRELOAD  = 1'b1,
  localparam int AW = $clog2(NS_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command port
  input  ns_cmd_t       cmd,
  input  logic          cmd_valid,
  output logic          ready,
  output logic          done,
  input  name_t         name,
  input  logic          seek_en,
  input  logic [15:0]   seek,
  output logic [7:0]    part_off,
  input  logic [AW-1:0] rec,
  input  logic [8:0]    off,
  input  logic [7:0]    wdata,
  input  logic [7:0]    dev,
  output logic          found,
  output logic [AW-1:0] rec_o,
  output qid_t          qid_o,
  output logic [7:0]    len_o,
  output logic [AW:0]   free_bytes,
  // encoder read port
  input  logic [AW-1:0] rd_rec,
  input  logic [7:0]    rd_off,
  input  logic [7:0]    rd_dev,
  output logic [7:0]    rd_data,
  // devices
  output logic [7:0]    leds,
  input  logic [7:0]    switches,
  output logic [6:0]    seg_lo,
  output logic [6:0]    seg_hi,
  output logic          bell
);
  localparam int NPRE    = 4;
  localparam int PRE_REC = REC_HDR + 1;       // 23 bytes per preloaded file

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_SCAN, S_DONE} state_t;
  state_t state;

  logic [AW:0]   free_ptr, ptr;   // one bit wider: may reach NS_BYTES
  logic [4:0]    k;          // header byte index being issued
  logic          k_vld;      // a read was issued last cycle
  logic [4:0]    k_q;
  logic [7:0]    hdr [REC_HDR];
  name_t         want;
  logic          want_seek;
  logic [15:0]   left;       // bytes of the file still to skip
  logic [2:0]    pre_rec;
  logic [4:0]    pre_k;

  // RAM port A
  logic          a_we;
  logic [AW-1:0] a_addr;
  logic [7:0]    a_wdata, a_rdata;
  logic [7:0]    b_rdata;
  logic          ovr_valid;
  logic [7:0]    ovr_data;

  // preload contents
  function automatic logic [7:0] pre_byte(logic [2:0] r, logic [4:0] i);
    logic [63:0] nm;
    case (r)
      3'd0:    nm = 64'h00_00_00_00_73_64_65_6C;  // "leds"
      3'd1:    nm = 64'h73_65_68_63_74_69_77_73;  // "switches"
      3'd2:    nm = 64'h00_74_6E_65_6D_67_65_73;  // "segment"
      default: nm = 64'h00_00_00_00_6C_6C_65_62;  // "bell"
    endcase
    if (i == 5'd5) return 8'(r) + 8'd1;                     // QID path
    if (i >= 5'd13 && i <= 5'd20) return 8'(nm >> {3'(i - 5'd13), 3'b000});  // name
    if (i == 5'd21) return 8'd1;                            // length
    if (i == 5'd0) return QT_FILE;                          // QID type
    return 8'd0;                                            // vers, data
  endfunction

  wire take = cmd_valid && ready;

  // the header just read names the wanted file and is not deleted
  wire name_hit = hdr[0] != QT_DELETED &&
                  {hdr[20], hdr[19], hdr[18], hdr[17], hdr[16], hdr[15], hdr[14], hdr[13]} == want;

  always_comb begin
    a_we    = 1'b0;
    a_addr  = '0;
    a_wdata = wdata;
    unique case (state)
      S_INIT: begin
        a_we    = 1'b1;
        a_addr  = AW'(pre_rec) * AW'(PRE_REC) + AW'(pre_k);
        a_wdata = pre_byte(pre_rec, pre_k);
      end
      S_SCAN: a_addr = ptr[AW-1:0] + AW'(k);
      S_IDLE: if (cmd_valid) begin
        unique case (cmd)
          NS_WRITE:  begin a_we = 1'b1; a_addr = rec + AW'(REC_HDR) + AW'(off[7:0]); end
          NS_APPEND: begin a_we = 1'b1; a_addr = free_ptr[AW-1:0] + AW'(off); end
          NS_DELETE: begin a_we = 1'b1; a_addr = rec; a_wdata = QT_DELETED; end
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= PRELOAD ? S_INIT : S_IDLE;
      free_ptr <= '0;
      ptr      <= '0;
      k        <= '0;
      k_vld    <= 1'b0;
      k_q      <= '0;
      pre_rec  <= '0;
      pre_k    <= '0;
      done     <= 1'b0;
      found    <= 1'b0;
      rec_o    <= '0;
      qid_o    <= '0;
      len_o    <= '0;
      want     <= '0;
      want_seek <= 1'b0;
      left     <= '0;
      part_off <= '0;
    end else begin
      done  <= 1'b0;
      k_vld <= 1'b0;
      k_q   <= k;
      unique case (state)
        S_INIT: begin
          if (pre_k == 5'(PRE_REC - 1)) begin
            pre_k <= '0;
            if (pre_rec == 3'(NPRE - 1)) begin
              state    <= S_IDLE;
              free_ptr <= (AW+1)'(NPRE * PRE_REC);
            end
            pre_rec <= pre_rec + 1'b1;
          end else pre_k <= pre_k + 1'b1;
        end
        S_IDLE: if (take) begin
          unique case (cmd)
            NS_FIND: begin
              want  <= name;
              want_seek <= seek_en;
              left  <= seek;
              ptr   <= '0;
              k     <= '0;
              found <= 1'b0;
              state <= S_SCAN;
            end
            NS_COMMIT: free_ptr <= free_ptr + (AW+1)'(off);
            default: ;
          endcase
        end
        S_SCAN: begin
          if (ptr >= free_ptr) begin
            state <= S_DONE;           // end of namespace, not found
          end else begin
            // issue header reads k = 0..21, capture one cycle later
            if (k != 5'(REC_HDR)) begin
              k     <= k + 1'b1;
              k_vld <= 1'b1;
            end
          end
          if (k_vld) hdr[k_q] <= a_rdata;
          if (k == 5'(REC_HDR) && !k_vld) begin
            // whole header captured: compare
            if (name_hit && (!want_seek || left < 16'(hdr[LEN_OFS]))) begin
              found <= 1'b1;
              part_off <= 8'(left);
              rec_o <= ptr[AW-1:0];
              len_o <= hdr[LEN_OFS];
              qid_o <= {hdr[12], hdr[11], hdr[10], hdr[9], hdr[8], hdr[7], hdr[6], hdr[5],
                        hdr[4], hdr[3], hdr[2], hdr[1], hdr[0]};
              state <= S_DONE;
            end else begin
              if (name_hit) left <= left - 16'(hdr[LEN_OFS]);
              ptr <= ptr + (AW+1)'(REC_HDR) + (AW+1)'(hdr[LEN_OFS]);
              k   <= '0;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready      = (state == S_IDLE);
  assign free_bytes = (AW+1)'(NS_BYTES) - free_ptr;

  styx_ns_ram #(.DEPTH(NS_BYTES)) u_ram (
    .clk, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_addr (rd_rec + AW'(REC_HDR) + AW'(rd_off)),
    .b_rdata
  );

  styx_devctl u_dev (
    .clk, .rst_n,
    .wr_en   (state == S_IDLE && cmd_valid && cmd == NS_WRITE),
    .wr_dev  (dev),
    .wr_off  (off[7:0]),
    .wr_data (wdata),
    .rd_dev, .rd_off, .ovr_valid, .ovr_data,
    .leds, .switches, .seg_lo, .seg_hi, .bell
  );

  assign rd_data = ovr_valid ? ovr_data : b_rdata;
endmodule
