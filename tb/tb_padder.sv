// Testbench for padder in the four configurations of the data flow:
// 64->128 bits with 1-byte alignment, 128->256 with 2, 256->256 with 4, and
// 256->256 with 2 (the MEP packing).  Each runs random events against a
// byte-level model (padder_check); events ending with more bytes than one
// output word must occur.
module tb_padder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int c[4], f[4], m[4]; logic d[4];
  padder_check #(.IN_W(64),  .OUT_W(128), .ALIGN(1)) u0 (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]), .multi(m[0]));
  padder_check #(.IN_W(128), .OUT_W(256), .ALIGN(2)) u1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]), .multi(m[1]));
  padder_check #(.IN_W(256), .OUT_W(256), .ALIGN(4)) u2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]), .multi(m[2]));
  padder_check #(.IN_W(256), .OUT_W(256), .ALIGN(2)) u3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]), .multi(m[3]));
  int checks, failures;
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2]+c[3], f[0]+f[1]+f[2]+f[3]+1); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = c[0] + c[1] + c[2] + c[3] + 1;
    failures = f[0] + f[1] + f[2] + f[3];
    if (m[0] == 0 || m[1] == 0 || m[2] == 0) begin failures++; $display("no multi-word event end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
