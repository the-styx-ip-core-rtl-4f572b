// tb_styx_auth: version check, default user, user table updates, password
// check, authentication marking and per-file access rights.
module tb_styx_auth;
  import styx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  name_t q_version = 0, q_user = 0, q_pass = 0, set_user_name = 0, set_user_pass = 0;
  logic version_ok, pass_ok, attach_ok, perm_ok;
  logic [7:0] q_path = 0, set_user_idx = 0, set_perm_path = 0;
  logic [1:0] q_mode = 0, set_perm_bits = 0;
  logic mark_auth = 0, set_user = 0, set_perm = 0;
  styx_auth dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic name_t nm(string s);
    name_t n = '0;
    for (int i = 0; i < s.len() && i < 8; i++) n[8*i +: 8] = 8'(s[i]);
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    q_version = nm("9P2000"); #1 chk(version_ok, "9P2000 accepted");
    q_version = nm("9P2001"); #1 chk(!version_ok, "other version refused");
    q_user = nm("inferno"); #1 chk(attach_ok, "default user may attach");
    q_user = nm("alice"); #1 chk(!attach_ok && !pass_ok, "unknown user refused");
    // add alice with a password in slot 2
    set_user = 1; set_user_idx = 2; set_user_name = nm("alice"); set_user_pass = nm("secret");
    @(posedge clk); #1 set_user = 0;
    q_user = nm("alice"); q_pass = nm("wrong"); #1;
    chk(!pass_ok && !attach_ok, "wrong password refused");
    q_pass = nm("secret"); #1 chk(pass_ok && !attach_ok, "password ok, not yet authenticated");
    mark_auth = 1; @(posedge clk); #1 mark_auth = 0; #1;
    chk(attach_ok, "attach after authentication");
    // rights
    for (int p = 0; p < 4; p++) begin
      q_path = 8'(p); q_mode = 2'(p % 3); #1 chk(perm_ok, "default rights rw");
    end
    set_perm = 1; set_perm_path = 8'd3; set_perm_bits = 2'b01; @(posedge clk); #1 set_perm = 0;
    q_path = 8'd3; q_mode = OREAD;  #1 chk(perm_ok, "read allowed");
    q_mode = OWRITE; #1 chk(!perm_ok, "write denied");
    q_mode = ORDWR;  #1 chk(!perm_ok, "rdwr denied");
    q_path = 8'd4; q_mode = OWRITE; #1 chk(perm_ok, "other file unaffected");
    set_perm = 1; set_perm_path = 8'd4; set_perm_bits = 2'b10; @(posedge clk); #1 set_perm = 0;
    q_mode = OREAD; #1 chk(!perm_ok, "read denied on write-only file");
    q_mode = 2'd3;  #1 chk(!perm_ok, "invalid mode denied");
    // removing a user
    set_user = 1; set_user_idx = 0; set_user_name = 0; set_user_pass = 0;
    @(posedge clk); #1 set_user = 0;
    q_user = nm("inferno"); q_pass = 0; #1 chk(!attach_ok, "removed user refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
