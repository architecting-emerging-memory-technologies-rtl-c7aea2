// tb_mlc_llc -- self-checking test of the reconfigurable MLC STT-RAM LLC.
// Small configuration (4 sets, 8 ways) behind a memory model with a fixed
// latency.  A directed part drives one set through LBM hits, the protection
// bit, the LBM->SBM switch, SBM hits, and back to LBM with re-fetch, checking
// each decision and the hit latencies of both modes (10/7 cycles read,
// 44/23 write).  A random part then mixes reads and writes over more lines
// than fit, checking every read against a reference memory image.
module tb_mlc_llc;
  localparam int SETS = 4, WAYS = 8, MEM_LAT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready, req_we = 0;
  logic [31:0] req_addr = 0;
  logic [255:0] req_wdata = 0;
  logic resp_valid, resp_hit;
  logic [255:0] resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [511:0] mem_req_wdata, mem_resp_rdata;
  logic [1:0] mem_req_wmask;
  logic ev_hit, ev_miss, ev_to_sbm, ev_to_lbm, ev_pb_set, ev_writeback, ev_refetch;

  mlc_llc #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_sbm = 0, n_lbm = 0, n_pb = 0, n_wb = 0, n_rf = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  always @(posedge clk) begin
    n_hit += ev_hit; n_miss += ev_miss; n_sbm += ev_to_sbm; n_lbm += ev_to_lbm;
    n_pb += ev_pb_set; n_wb += ev_writeback; n_rf += ev_refetch;
  end

  // memory model: 64-byte lines, initial content derived from the address
  logic [511:0] mem [int];
  function automatic logic [511:0] init_line(input logic [31:0] a);
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = a ^ (32'h9e3779b9 * (i + 1));
    return l;
  endfunction
  function automatic logic [511:0] mem_rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction
  // reference image of what the cache must return
  logic [511:0] ref_img [int];
  function automatic logic [255:0] ref_rd(input logic [31:0] a);
    logic [511:0] l;
    l = ref_img.exists({a[31:6], 6'b0}) ? ref_img[{a[31:6], 6'b0}] : init_line({a[31:6], 6'b0});
    return a[5] ? l[511:256] : l[255:0];
  endfunction

  int mem_cnt = -1;
  logic [31:0] mem_pend;
  assign mem_req_ready = (mem_cnt < 0);
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin
        logic [511:0] l;
        l = mem_rd(mem_req_addr);
        if (mem_req_wmask[0]) l[255:0] = mem_req_wdata[255:0];
        if (mem_req_wmask[1]) l[511:256] = mem_req_wdata[511:256];
        mem[mem_req_addr] = l;
      end else begin
        mem_cnt <= MEM_LAT;
        mem_pend <= mem_req_addr;
      end
    end
    if (mem_cnt > 0) mem_cnt <= mem_cnt - 1;
    if (mem_cnt == 0) begin
      mem_resp_valid <= 1'b1;
      mem_resp_rdata <= mem_rd(mem_pend);
      mem_cnt <= -1;
    end
  end

  // one access; returns latency in cycles and the hit flag
  task automatic access(input bit we, input logic [31:0] a, output int lat, output bit h);
    logic [255:0] wd;
    wd = {8{$urandom}};
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    h = resp_hit;
    if (!we) check(resp_rdata == ref_rd(a), $sformatf("read data at %h", a));
    else begin
      logic [511:0] l;
      l = ref_img.exists({a[31:6], 6'b0}) ? ref_img[{a[31:6], 6'b0}] : init_line({a[31:6], 6'b0});
      if (a[5]) l[511:256] = wd; else l[255:0] = wd;
      ref_img[{a[31:6], 6'b0}] = l;
    end
  endtask

  // address of line k in set 0 (set index is address bits 6..7 here)
  function automatic logic [31:0] la(input int k, input bit upper);
    return 32'(k) << 8 | (upper ? 32'h20 : 32'h0);
  endfunction

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat; bit h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill set 0 with 8 large blocks
    for (int k = 0; k < 8; k++) begin access(0, la(k, 0), lat, h); check(!h, "cold miss"); end
    // LBM hit latencies
    access(0, la(0, 1), lat, h); check(h && lat == 10, $sformatf("LBM read hit latency %0d", lat));
    access(1, la(1, 0), lat, h); check(h && lat == 44, $sformatf("LBM write hit latency %0d", lat));
    // make block 0's lower half hot: RC0 3 -> 0 (one hit already went to the upper half)
    access(0, la(0, 0), lat, h); access(0, la(0, 0), lat, h); access(0, la(0, 0), lat, h);
    check(dut.rc0_q[0] == 0, "RC0 of hot half reaches zero");
    // first miss with the pattern sets PB, second switches to SBM
    access(0, la(8, 0), lat, h); check(!h && n_pb == 1 && dut.ms_q[0] == 0, $sformatf("PB set, still LBM h=%0d pb=%0d ms=%0d", h, n_pb, dut.ms_q[0]));
    access(0, la(9, 0), lat, h); check(!h && n_sbm == 1 && dut.ms_q[0] == 1, "switched to SBM");
    check(n_wb >= 1, "dirty block written back before the switch");
    // SBM hits on the kept lower half, upper half now misses
    access(0, la(0, 0), lat, h); check(h && lat == 7, $sformatf("SBM read hit latency %0d", lat));
    access(1, la(0, 0), lat, h); check(h && lat == 23, $sformatf("SBM write hit latency %0d", lat));
    access(0, la(0, 1), lat, h); check(!h, "upper half not kept");
    // five fresh small blocks, each hit until its counter is zero
    for (int k = 30; k < 35; k++) begin
      access(0, la(k, 0), lat, h); check(!h, "fresh small block misses");
      repeat (3) begin access(0, la(k, 0), lat, h); check(h, "small block hit"); end
    end
    // misses now see more than THETA_SL zeros: the first sets PB, the next switches
    begin
      int pb0, j;
      pb0 = n_pb; j = 0;
      while (dut.ms_q[0] == 1 && j < 4) begin access(0, la(40 + j, 0), lat, h); j++; end
      check(n_lbm == 1 && dut.ms_q[0] == 0, "switched back to LBM");
      check(n_pb == pb0 + 1 || (j == 1 && n_pb == pb0), "PB set on the miss before the switch");
    end
    check(n_rf > 0, "upper halves re-fetched");
    access(0, la(30, 1), lat, h); check(h && lat == 10, "re-fetched upper half hits in LBM");
    // random traffic over 4 sets and 48 lines
    for (int it = 0; it < 3000; it++) begin
      logic [31:0] a;
      if ((it / 300) % 2 == 0)
        a = ($urandom % 10 == 0) ? {20'h0, 4'(8 + $urandom % 8), 2'($urandom), 1'($urandom), 5'h0}
                                 : {20'h0, 4'($urandom % 3), 2'($urandom), 1'b0, 5'h0};
      else
        a = (it % 16 == 0) ? {20'h0, 4'(8 + $urandom % 8), 2'($urandom), 1'($urandom), 5'h0}
                           : {20'h0, 4'((it / 2) % 3), 2'($urandom), 1'(it % 2), 5'h0};
      access(1'($urandom % 3 == 0), a, lat, h);
    end
    $display("hits=%0d misses=%0d to_sbm=%0d to_lbm=%0d pb=%0d wb=%0d refetch=%0d",
             n_hit, n_miss, n_sbm, n_lbm, n_pb, n_wb, n_rf);
    check(n_sbm > 2 && n_lbm >= 1, "reconfigurations under random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
