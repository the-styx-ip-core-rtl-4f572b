// tb_styx_in_buf: the input buffer keeps network message bytes and
// instruction bytes apart, in order, and reads the FIFO chosen by sel.
module tb_styx_in_buf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic msg_wr = 0, inst_wr = 0, sel = 0, rd_en = 0;
  logic [7:0] wdata = 0, rd_data;
  logic msg_full, inst_full, msg_empty, inst_empty, rd_valid;
  styx_in_buf #(.DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] mq[$], iq[$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // interleaved writes to the two FIFOs
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      wdata = 8'($urandom);
      msg_wr = i[0]; inst_wr = !i[0];
      if (i[0] && mq.size() < 64) mq.push_back(wdata);
      if (!i[0] && iq.size() < 64) iq.push_back(wdata);
    end
    @(posedge clk); #1; msg_wr = 0; inst_wr = 0;
    #1 chk(!msg_empty && !inst_empty, "both FIFOs hold data");
    // read instructions, then messages
    for (int s = 1; s >= 0; s--) begin
      sel = s[0];
      while (1) begin
        #1;
        if (!rd_valid) break;
        chk(rd_data == (s ? iq[0] : mq[0]), s ? "instruction byte" : "message byte");
        if (s) void'(iq.pop_front()); else void'(mq.pop_front());
        rd_en = 1; @(posedge clk); #1; rd_en = 0;
      end
      chk((s ? iq.size() : mq.size()) == 0, "all bytes came out");
    end
    chk(msg_empty && inst_empty, "both empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
