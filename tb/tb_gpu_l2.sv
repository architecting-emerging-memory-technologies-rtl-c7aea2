// tb_gpu_l2 -- checks the multi-partition L2: requests to every partition
// with read data compared against a reference image, and pre-migration: a
// write-triggered migration in one partition must move the blocks with the
// same set and tag in the other partitions to their SRAM parts (seen as an
// SRAM hit latency of 5 cycles there).  4 partitions, small arrays.
module tb_gpu_l2;
  localparam int NP = 4, MEM_LAT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] req_valid = '0, req_ready, req_we = '0, resp_valid, resp_hit;
  logic [NP-1:0][31:0] req_addr = '0, req_wdata = '0, resp_rdata;
  logic [NP-1:0] mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [NP-1:0][31:0] mem_req_addr;
  logic [NP-1:0][1023:0] mem_req_wdata, mem_resp_rdata;
  logic [NP-1:0][9:0] events;
  gpu_l2 #(.NPART(NP), .STT_SETS(8), .SRAM_SETS(4), .WAYS(4)) dut (.*);

  int checks = 0, failures = 0, n_premig = 0, n_mig = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  always @(posedge clk) for (int p = 0; p < NP; p++) begin
    n_premig += events[p][8]; n_mig += events[p][6] + events[p][7];
  end

  // one shared memory image (addresses include the partition bits)
  logic [1023:0] mem [int];
  function automatic logic [1023:0] mrd(input logic [31:0] a);
    logic [1023:0] l;
    if (mem.exists(a)) return mem[a];
    for (int i = 0; i < 32; i++) l[i*32 +: 32] = (a + 32'(i * 4)) * 32'd2654435761;
    return l;
  endfunction
  int mcnt [NP]; logic [31:0] mpend [NP];
  for (genvar p = 0; p < NP; p++) begin : g_mem
    assign mem_req_ready[p] = (mcnt[p] < 0);
    initial mcnt[p] = -1;
    always @(posedge clk) begin
      mem_resp_valid[p] <= 0;
      if (mem_req_valid[p] && mem_req_ready[p]) begin
        if (mem_req_we[p]) mem[mem_req_addr[p]] = mem_req_wdata[p];
        else begin mcnt[p] <= MEM_LAT; mpend[p] <= mem_req_addr[p]; end
      end
      if (mcnt[p] > 0) mcnt[p] <= mcnt[p] - 1;
      if (mcnt[p] == 0) begin
        mem_resp_valid[p] <= 1; mem_resp_rdata[p] <= mrd(mpend[p]); mcnt[p] <= -1;
      end
    end
  end

  logic [31:0] ref_w [int];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_w.exists(a) ? ref_w[a] : a * 32'd2654435761;
  endfunction

  task automatic access(input bit we, input logic [31:0] a, output int lat, output bit h);
    int p; logic [31:0] d;
    p = int'(a[8:7]); d = $urandom;
    @(negedge clk);
    while (!req_ready[p]) @(negedge clk);
    req_valid[p] = 1; req_we[p] = we; req_addr[p] = a; req_wdata[p] = d;
    @(negedge clk);
    req_valid[p] = 0; lat = 1;
    while (!resp_valid[p]) begin @(negedge clk); lat++; end
    h = resp_hit[p];
    if (we) ref_w[a] = d;
    else check(resp_rdata[p] == ref_rd(a), $sformatf("data %h", a));
  endtask

  function automatic logic [31:0] la(input int k, input int s, input int p);
    return (32'(k) << 12) | (32'(s) << 9) | (32'(p) << 7) | 32'h10;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lat; bit h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) access(0, la(3, 1, p), lat, h);
    for (int p = 0; p < NP; p++) begin
      access(0, la(3, 1, p), lat, h); check(h && lat == 4, "block in STT-RAM everywhere");
    end
    access(1, la(3, 1, 0), lat, h);
    access(1, la(3, 1, 0), lat, h);
    repeat (10) @(negedge clk);
    check(n_premig == NP - 1, $sformatf("other partitions pre-migrated (%0d)", n_premig));
    for (int p = 0; p < NP; p++) begin
      access(0, la(3, 1, p), lat, h); check(h && lat == 5, $sformatf("partition %0d block in SRAM", p));
    end
    for (int it = 0; it < 3000; it++) begin
      logic [31:0] a;
      a = la($urandom % 10, $urandom % 8, $urandom % NP) + 32'(($urandom % 4) * 4);
      access(1'($urandom % 3 == 0), a, lat, h);
    end
    $display("premigrations=%0d migrations=%0d", n_premig, n_mig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
