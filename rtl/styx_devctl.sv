// styx_devctl: device control logic of the namespace.
//
// The namespace files stand for devices: writing a file changes the device,
// reading it reports the device's state. This block makes that link for the
// four devices of the demonstration board. A device file is recognised by
// the low byte of its QID path (1 LEDs, 2 switches, 3 seven-segment
// display, 4 bell). On every data byte written into a file (wr_en with
// wr_dev and wr_off), byte 0 of the LED file is latched onto the eight LEDs,
// byte 0 of the display file is shown as two hex digits, and byte 0 of the
// bell file rings the bell while it is non-zero. Reads of the switch file
// are answered with the live switch levels instead of the stored byte:
// rd_dev/rd_off are sampled with the RAM read address, and ovr_valid and
// ovr_data are valid in the next cycle, aligned with the RAM data.
// Switch inputs pass through a two-stage synchroniser. The device numbering
// and the byte meanings are this design's choices.
module styx_devctl
  import styx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // file writes
  input  logic       wr_en,
  input  logic [7:0] wr_dev,
  input  logic [7:0] wr_off,
  input  logic [7:0] wr_data,
  // file reads (encoder port)
  input  logic [7:0] rd_dev,
  input  logic [7:0] rd_off,
  output logic       ovr_valid,
  output logic [7:0] ovr_data,
  // devices
  output logic [7:0] leds,
  input  logic [7:0] switches,
  output logic [6:0] seg_lo,
  output logic [6:0] seg_hi,
  output logic       bell
);
  logic [7:0] sw_s1, sw_s2, seg_val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      leds    <= '0;
      seg_val <= '0;
      bell    <= 1'b0;
      sw_s1   <= '0;
      sw_s2   <= '0;
      ovr_valid <= 1'b0;
      ovr_data  <= '0;
    end else begin
      sw_s1 <= switches;
      sw_s2 <= sw_s1;
      if (wr_en && wr_off == 8'd0) begin
        case (wr_dev)
          DEV_LEDS: leds    <= wr_data;
          DEV_SEG:  seg_val <= wr_data;
          DEV_BELL: bell    <= (wr_data != 8'd0);
          default: ;
        endcase
      end
      ovr_valid <= (rd_dev == DEV_SWITCH) && (rd_off == 8'd0);
      ovr_data  <= sw_s2;
    end
  end

  assign seg_lo = hex7(seg_val[3:0]);
  assign seg_hi = hex7(seg_val[7:4]);
endmodule
