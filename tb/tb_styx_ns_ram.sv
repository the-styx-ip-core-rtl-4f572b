// tb_styx_ns_ram: both ports of the namespace RAM return the byte written
// at an address one cycle after the address is presented.
module tb_styx_ns_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0;
  logic [8:0] a_addr = 0, b_addr = 0;
  logic [7:0] a_wdata = 0, a_rdata, b_rdata;
  styx_ns_ram #(.DEPTH(512)) dut (.*);
  logic [7:0] model [512];

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(posedge clk); #1; a_we = 1; a_addr = 9'(i); a_wdata = 8'(i * 13 + 7); model[i] = a_wdata;
    end
    @(posedge clk); #1 a_we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [8:0] aa, bb;
      aa = 9'($urandom); bb = 9'($urandom);
      a_addr = aa; b_addr = bb;
      @(posedge clk); #1;
      chk(a_rdata == model[aa], "port A read");
      chk(b_rdata == model[bb], "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
