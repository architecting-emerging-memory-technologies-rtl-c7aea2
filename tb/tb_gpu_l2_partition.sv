// tb_gpu_l2_partition -- self-checking test of one hybrid STT-RAM/SRAM L2
// partition.  Directed parts replay the document's example counter sequence
// (read miss, reads, writes, migration to SRAM on the second write with the
// write counter set), a read-triggered migration back to STT-RAM, write-miss
// allocation in SRAM, the transit address buffer, and an incoming
// pre-migration notice.  The part a block sits in is observed through its
// hit latency (STT-RAM read 4 cycles, SRAM read 5).  A random part checks all
// read data against a reference image.  Small arrays: 8 STT-RAM sets,
// 4 SRAM sets, 4 ways.
module tb_gpu_l2_partition;
  localparam int PID = 3, MEM_LAT = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_we = 0, resp_valid, resp_hit;
  logic [31:0] req_addr = 0, req_wdata = 0, resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [1023:0] mem_req_wdata, mem_resp_rdata;
  logic pm_out_valid, pm_out_to_stt, pm_in_valid = 0, pm_in_to_stt = 0;
  logic [21:0] pm_out_line, pm_in_line = 0;
  logic ev_hit_stt, ev_hit_sram, ev_miss, ev_fill_sram, ev_tab_hit, ev_tab_ins,
        ev_mig_to_sram, ev_mig_to_stt, ev_premig, ev_writeback;

  gpu_l2_partition #(.PID(PID), .STT_SETS(8), .SRAM_SETS(4), .WAYS(4)) dut (.*);

  int checks = 0, failures = 0;
  int n_mig_sram = 0, n_mig_stt = 0, n_tab_ins = 0, n_tab_hit = 0, n_pm = 0, n_pm_out = 0, n_wb = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  always @(posedge clk) begin
    n_mig_sram += ev_mig_to_sram; n_mig_stt += ev_mig_to_stt; n_tab_ins += ev_tab_ins;
    n_tab_hit += ev_tab_hit; n_pm += ev_premig; n_pm_out += pm_out_valid; n_wb += ev_writeback;
  end

  // DRAM channel model
  logic [1023:0] mem [int];
  function automatic logic [1023:0] init_line(input logic [31:0] a);
    logic [1023:0] l;
    for (int i = 0; i < 32; i++) l[i*32 +: 32] = a + 32'(i * 4) ^ 32'h5a5a0000;
    return l;
  endfunction
  function automatic logic [1023:0] mrd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction
  int mcnt = -1; logic [31:0] mpend;
  assign mem_req_ready = (mcnt < 0);
  always @(posedge clk) begin
    mem_resp_valid <= 0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) mem[mem_req_addr] = mem_req_wdata;
      else begin mcnt <= MEM_LAT; mpend <= mem_req_addr; end
    end
    if (mcnt > 0) mcnt <= mcnt - 1;
    if (mcnt == 0) begin mem_resp_valid <= 1; mem_resp_rdata <= mrd(mpend); mcnt <= -1; end
  end

  logic [31:0] ref_w [int];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_w.exists(a) ? ref_w[a] : a ^ 32'h5a5a0000;
  endfunction

  task automatic access(input bit we, input logic [31:0] a, output int lat, output bit h);
    logic [31:0] d;
    d = $urandom;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0; lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    h = resp_hit;
    if (we) ref_w[a] = d;
    else check(resp_rdata == ref_rd(a), $sformatf("read data %h: %h vs %h", a, resp_rdata, ref_rd(a)));
  endtask

  // word address of line k in STT set s (partition bits fixed to PID)
  function automatic logic [31:0] la(input int k, input int s);
    return (32'(k) << 13) | (32'(s) << 10) | (32'(PID) << 7) | 32'h8;
  endfunction

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat, m0; bit h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the example event sequence
    m0 = n_mig_sram;
    access(0, la(1, 0), lat, h); check(!h, "1 read miss");
    access(0, la(1, 0), lat, h); check(h && lat == 4, $sformatf("2 read hit in STT-RAM %0d", lat));
    access(0, la(1, 0), lat, h); check(h && lat == 4, "3 read hit");
    access(1, la(1, 0), lat, h); check(h && lat == 30, $sformatf("4 write hit in STT-RAM %0d", lat));
    access(0, la(1, 0), lat, h); check(h && lat == 4, "5 read hit, counters reset");
    access(0, la(1, 0), lat, h); access(0, la(1, 0), lat, h);
    access(1, la(1, 0), lat, h); check(h && lat == 30 && n_mig_sram == m0, "8 write hit, no migration yet");
    access(1, la(1, 0), lat, h); check(h && n_mig_sram == m0 + 1, "9 write hit migrates to SRAM");
    check(n_pm_out == 1, "pre-migration notice sent");
    access(0, la(1, 0), lat, h); check(h && lat == 5, $sformatf("now an SRAM read hit %0d", lat));
    // reads in SRAM: RRC 1,2,3 then the fourth read migrates back
    access(0, la(1, 0), lat, h); access(0, la(1, 0), lat, h);
    check(n_mig_stt == 0, "no migration before saturation");
    access(0, la(1, 0), lat, h); check(n_mig_stt == 1, "read-saturated block migrates to STT-RAM");
    access(0, la(1, 0), lat, h); check(h && lat == 4, "now an STT-RAM read hit");
    // write miss goes to SRAM
    access(1, la(2, 1), lat, h); check(!h, "write miss");
    access(0, la(2, 1), lat, h); check(h && lat == 5, "write-miss block sits in SRAM");
    // transit data: fill set 2 of STT-RAM with untouched blocks, overflow it
    for (int k = 0; k < 5; k++) access(0, la(10 + k, 2), lat, h);
    check(n_tab_ins >= 1, "evicted untouched block enters the TAB");
    m0 = n_tab_hit;
    access(0, la(20, 2), lat, h); check(!h && n_tab_hit == m0 + 1, "read miss matches the TAB");
    access(0, la(20, 2), lat, h); check(h && lat == 5, "TAB-matched block sits in SRAM");
    // pre-migration notice for a block in STT-RAM
    access(0, la(5, 5), lat, h);
    @(negedge clk);
    pm_in_valid = 1; pm_in_to_stt = 0; pm_in_line = la(5, 5)[31:10];
    @(negedge clk);
    pm_in_valid = 0;
    repeat (5) @(negedge clk);
    check(n_pm == 1, "pre-migration applied");
    access(0, la(5, 5), lat, h); check(h && lat == 5, "pre-migrated block sits in SRAM");
    // random traffic
    for (int it = 0; it < 4000; it++) begin
      logic [31:0] a;
      a = la($urandom % 12, $urandom % 8) + 32'(($urandom % 4) * 4);
      access(1'($urandom % 3 == 0), a, lat, h);
    end
    $display("mig_sram=%0d mig_stt=%0d tab_ins=%0d tab_hit=%0d premig=%0d wb=%0d",
             n_mig_sram, n_mig_stt, n_tab_ins, n_tab_hit, n_pm, n_wb);
    check(n_wb > 0 && n_mig_sram > 5 && n_mig_stt > 5, "random traffic exercises migrations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
