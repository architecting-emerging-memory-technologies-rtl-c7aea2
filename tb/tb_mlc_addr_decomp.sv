// tb_mlc_addr_decomp -- checks the two-mode address split: the worked
// example 0xc7a97eeb (set 0x5fb in both modes) and random addresses against
// an arithmetic reference.
module tb_mlc_addr_decomp;
  logic [31:0] addr;
  logic ms;
  logic [12:0] set_idx;
  logic [13:0] tag;
  logic [5:0] offset;
  mlc_addr_decomp dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    addr = 32'hc7a97eeb; ms = 0; #1;
    check(set_idx == 13'h5fb && tag == 14'h31ea && offset == 6'h2b, "example LBM");
    ms = 1; #1;
    check(set_idx == 13'h5fb && tag == 14'h31eb && offset == 6'h0b, "example SBM");
    for (int i = 0; i < 2000; i++) begin
      longint unsigned a;
      addr = $urandom; ms = 1'($urandom); #1;
      a = addr;
      check(set_idx == 13'((a / 64) % 8192), "set");
      check(tag == 14'((a / 524288) * 2 + (ms ? (a / 32) % 2 : 0)), "tag");
      check(offset == 6'(ms ? a % 32 : a % 64), "offset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
