// tb_styx_fifo: random push/pop test of the byte FIFO against a queue
// model, checking data order, the empty/full flags, the count, that a push
// into a full FIFO is dropped and that a push and a pop in the same cycle
// pass one byte per cycle.
module tb_styx_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       wr_en = 0, rd_en = 0, empty, full;
  logic [7:0] wr_data = 0, rd_data;
  logic [6:0] count;
  styx_fifo #(.WIDTH(8), .DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model[$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // fill past full, then drain, then random traffic
    for (int phase = 0; phase < 3; phase++) begin
      for (int n = 0; n < 1500; n++) begin
        @(posedge clk); #1;
        case (phase)
          0: begin wr_en = (n < 70); rd_en = 0; end
          1: begin wr_en = 0; rd_en = 1; end
          default: begin wr_en = $urandom_range(0, 1); rd_en = $urandom_range(0, 1); end
        endcase
        wr_data = 8'($urandom);
        #1;
        chk(empty == (model.size() == 0), "empty flag");
        chk(full == (model.size() == 64), "full flag");
        chk(int'(count) == model.size(), $sformatf("count %0d vs %0d phase %0d n %0d", count, model.size(), phase, n));
        if (rd_en && model.size() > 0) chk(rd_data == model[0], "head data");
        @(negedge clk);
        begin
          bit pop, push;
          pop  = rd_en && model.size() > 0;
          push = wr_en && model.size() < 64;
          if (pop) void'(model.pop_front());
          if (push) model.push_back(wr_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
