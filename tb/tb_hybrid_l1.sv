// tb_hybrid_l1 -- self-checking testbench for the hybrid SRAM/STT-RAM L1.
//
// Three copies of the cache, one per placement policy (naive, immediate,
// delayed), receive the same stream of core accesses and snooped remote
// operations.  Each copy has its own bus responder and its own memory image;
// one golden copy of every line holds the value a coherent system must
// return.  The caches are shrunk (2+4 sets, 2 ways) so evictions, write-backs
// and moves happen often.
// Checked:
//   * directed sequences: which partition serves each access under each
//     policy (fill by miss type, move on write under IMM, TD-bit counting and
//     TD clearing on reads under DELAYED, moves on remote read / update);
//   * every load returns the golden value; write-backs and updates carry the
//     golden line; a snoop that hits an M/O copy supplies the golden line, and
//     whenever the cache does not own a line the memory image is current;
//   * hit latency: SRAM 3/3, STT-RAM 4 read / 10 write cycles from the
//     accepting edge to the edge that samples resp_valid;
//   * the naive policy never moves a block, the other two move both ways;
//   * refresh runs once per interval.
// A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_hybrid_l1;
  import l1_pkg::*;
  localparam int ND = 3, NL = 32;
  localparam int SR_SETS = 2, ST_SETS = 4, W = 2;
  localparam int REF_INT = 60;
  localparam int RET = ST_SETS * W * REF_INT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // shared stimulus
  logic cpu_we; logic [31:0] cpu_addr; logic [63:0] cpu_wdata;
  snp_cmd_t snp_cmd; logic [31:0] snp_addr; logic [511:0] snp_data;
  // per copy
  logic cpu_valid[ND], cpu_ready[ND], resp_valid[ND], resp_hit[ND];
  logic [63:0] resp_rdata[ND];
  logic breq_valid[ND]; bus_cmd_t breq_cmd[ND]; logic [31:0] breq_addr[ND];
  logic [511:0] breq_data[ND];
  logic bresp_valid[ND], bresp_shared[ND]; logic [511:0] bresp_data[ND];
  logic snp_valid[ND], snp_ready[ND], sresp_valid[ND], sresp_hit[ND], sresp_supply[ND];
  logic [511:0] sresp_data[ND];
  logic e_hr[ND], e_hs[ND], e_miss[ND], e_m2r[ND], e_m2s[ND], e_sttw[ND], e_ref[ND],
        e_refw[ND], e_upd[ND], e_wb[ND];

  logic [511:0] golden [NL];
  logic [511:0] mem [ND][NL];
  bit           rhas [ND][NL];
  int n_m2r[ND], n_m2s[ND], n_ref[ND], n_upd[ND], n_wb[ND], n_hr[ND], n_hs[ND], n_miss[ND];

  for (genvar g = 0; g < ND; g++) begin : g_dut
    hybrid_l1 #(.SRAM_SETS(SR_SETS), .STT_SETS(ST_SETS), .WAYS(W), .POLICY(policy_t'(g)),
                .RETENTION(RET)) u_dut (
      .clk, .rst_n,
      .cpu_req_valid(cpu_valid[g]), .cpu_req_ready(cpu_ready[g]), .cpu_req_we(cpu_we),
      .cpu_req_addr(cpu_addr), .cpu_req_wdata(cpu_wdata), .cpu_resp_valid(resp_valid[g]),
      .cpu_resp_hit(resp_hit[g]), .cpu_resp_rdata(resp_rdata[g]),
      .bus_req_valid(breq_valid[g]), .bus_req_ready(1'b1), .bus_req_cmd(breq_cmd[g]),
      .bus_req_addr(breq_addr[g]), .bus_req_data(breq_data[g]),
      .bus_resp_valid(bresp_valid[g]), .bus_resp_shared(bresp_shared[g]),
      .bus_resp_data(bresp_data[g]),
      .snp_valid(snp_valid[g]), .snp_ready(snp_ready[g]), .snp_cmd(snp_cmd),
      .snp_addr(snp_addr), .snp_data(snp_data), .snp_resp_valid(sresp_valid[g]),
      .snp_resp_hit(sresp_hit[g]), .snp_resp_supply(sresp_supply[g]),
      .snp_resp_data(sresp_data[g]),
      .ev_hit_sram(e_hr[g]), .ev_hit_stt(e_hs[g]), .ev_miss(e_miss[g]),
      .ev_mig_to_sram(e_m2r[g]), .ev_mig_to_stt(e_m2s[g]), .ev_stt_write(e_sttw[g]),
      .ev_refresh(e_ref[g]), .ev_refresh_wait(e_refw[g]), .ev_update(e_upd[g]),
      .ev_writeback(e_wb[g])
    );

    // bus responder and memory image of this copy
    int  cd;
    bit  pend;
    always @(negedge clk) if (rst_n) begin
      int l;
      bresp_valid[g] = 1'b0;
      if (pend) begin
        if (cd == 0) begin bresp_valid[g] = 1'b1; pend = 1'b0; end
        else cd--;
      end
      if (breq_valid[g]) begin
        l = int'(breq_addr[g][10:6]);
        check(breq_addr[g][5:0] == 0 && breq_addr[g][31:11] == 0, "bus address alignment");
        case (breq_cmd[g])
          BUS_RD: begin
            bresp_data[g] = mem[g][l]; bresp_shared[g] = rhas[g][l]; pend = 1'b1; cd = 1;
          end
          BUS_RDX: begin
            bresp_data[g] = mem[g][l]; bresp_shared[g] = 1'b0; rhas[g][l] = 1'b0;
            pend = 1'b1; cd = 1;
          end
          BUS_UPD: begin
            check(breq_data[g] == golden[l], $sformatf("copy %0d update data line %0d", g, l));
            bresp_shared[g] = rhas[g][l]; pend = 1'b1; cd = 1; n_upd[g]++;
          end
          default: begin
            check(breq_data[g] == golden[l], $sformatf("copy %0d write-back line %0d", g, l));
            mem[g][l] = breq_data[g]; n_wb[g]++;
          end
        endcase
      end
      if (e_m2r[g]) n_m2r[g]++;
      if (e_m2s[g]) n_m2s[g]++;
      if (e_ref[g]) n_ref[g]++;
      if (e_hr[g]) n_hr[g]++;
      if (e_hs[g]) n_hs[g]++;
      if (e_miss[g]) n_miss[g]++;
    end
  end

  // ---- drivers ----
  int hp[ND];        // partition of the last core access: 0 miss, 1 SRAM, 2 STT-RAM
  int lat[ND];
  int lat_checked = 0;

  task automatic cpu_op(input bit we, input int l, input int wd, input logic [63:0] d);
    bit acc[ND], done[ND], mig[ND], upd[ND], hit[ND];
    int t0[ND];
    logic [63:0] rd[ND];
    bit all;
    cpu_we = we; cpu_addr = (32'(l) << 6) | (32'(wd) << 3); cpu_wdata = d;
    if (we) golden[l][wd*64 +: 64] = d;
    for (int i = 0; i < ND; i++) begin
      cpu_valid[i] = 1'b1; done[i] = 0; mig[i] = 0; upd[i] = 0; hp[i] = 0; acc[i] = 0;
    end
    all = 0;
    while (!all) begin
      @(negedge clk);
      for (int i = 0; i < ND; i++) begin
        acc[i] = cpu_valid[i] && cpu_ready[i];
        if (acc[i]) t0[i] = int'(cyc) + 1;
        if (e_hr[i] && !cpu_valid[i]) hp[i] = 1;
        if (e_hs[i] && !cpu_valid[i]) hp[i] = 2;
        if (e_m2r[i] || e_m2s[i]) mig[i] = 1;
        if (e_upd[i]) upd[i] = 1;
        if (resp_valid[i] && !done[i]) begin
          done[i] = 1; lat[i] = int'(cyc) + 1 - t0[i]; rd[i] = resp_rdata[i];
          hit[i] = resp_hit[i];
        end
      end
      @(posedge clk); #1;
      all = 1;
      for (int i = 0; i < ND; i++) begin
        if (acc[i]) cpu_valid[i] = 1'b0;
        if (!done[i]) all = 0;
      end
    end
    for (int i = 0; i < ND; i++) begin
      if (!we) check(rd[i] == golden[l][wd*64 +: 64],
                     $sformatf("copy %0d load line %0d word %0d", i, l, wd));
      check(hit[i] == (hp[i] != 0), $sformatf("copy %0d hit flag", i));
      if (hp[i] != 0 && !mig[i] && !upd[i]) begin
        lat_checked++;
        check(lat[i] == (hp[i] == 1 ? 3 : (we ? 10 : 4)),
              $sformatf("copy %0d latency %0d (part %0d we %0d)", i, lat[i], hp[i], we));
      end
    end
  endtask

  task automatic snp_op(input snp_cmd_t c, input int l, input int wd, input logic [63:0] d,
                        output bit hitv[ND], output bit supv[ND]);
    logic [511:0] nl;
    bit acc[ND], got[ND], all;
    nl = golden[l];
    if (c != SNP_RD) nl[wd*64 +: 64] = d;
    snp_cmd = c; snp_addr = 32'(l) << 6; snp_data = nl;
    for (int i = 0; i < ND; i++) begin snp_valid[i] = 1'b1; got[i] = 0; end
    all = 0;
    while (!all) begin
      @(negedge clk);
      for (int i = 0; i < ND; i++) begin
        acc[i] = snp_valid[i] && snp_ready[i];
        if (sresp_valid[i] && !got[i] && !snp_valid[i]) begin
          got[i] = 1; hitv[i] = sresp_hit[i]; supv[i] = sresp_supply[i];
          if (sresp_supply[i]) begin
            check(sresp_data[i] == golden[l], $sformatf("copy %0d supplied line %0d", i, l));
            mem[i][l] = sresp_data[i];
          end else if (c != SNP_UPD)
            check(mem[i][l] == golden[l], $sformatf("copy %0d memory stale line %0d", i, l));
          rhas[i][l] = 1'b1;
          if (c != SNP_RD) mem[i][l] = nl;
        end
      end
      @(posedge clk); #1;
      all = 1;
      for (int i = 0; i < ND; i++) begin
        if (acc[i]) snp_valid[i] = 1'b0;
        if (!got[i]) all = 0;
      end
    end
    golden[l] = nl;
  endtask

  task automatic expect_hp(input int a, input int b, input int c, input string what);
    check(hp[0] == a && hp[1] == b && hp[2] == c,
          $sformatf("%s: partitions %0d %0d %0d, expected %0d %0d %0d",
                    what, hp[0], hp[1], hp[2], a, b, c));
  endtask

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    bit hv[ND], sv[ND];
    int l, wd, r;
    int expect_ref;
    for (int i = 0; i < NL; i++) begin
      golden[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                   $urandom, $urandom};
      for (int k = 0; k < ND; k++) begin mem[k][i] = golden[i]; rhas[k][i] = 0; end
    end
    for (int i = 0; i < ND; i++) begin
      cpu_valid[i] = 0; snp_valid[i] = 0; bresp_valid[i] = 0; bresp_shared[i] = 0;
      bresp_data[i] = '0;
    end
    cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; snp_cmd = SNP_RD; snp_addr = 0; snp_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // A: read miss fills STT-RAM; writes move it under IMM at once, under DELAYED on the
    // second consecutive write
    cpu_op(0, 0, 1, 0);          expect_hp(0, 0, 0, "A read miss");
    cpu_op(0, 0, 1, 0);          expect_hp(2, 2, 2, "A read fill place");
    cpu_op(1, 0, 2, 64'hA1);     expect_hp(2, 2, 2, "A write 1");
    cpu_op(1, 0, 3, 64'hA2);     expect_hp(2, 1, 2, "A write 2");
    cpu_op(1, 0, 4, 64'hA3);     expect_hp(2, 1, 1, "A write 3");
    cpu_op(0, 0, 2, 0);          expect_hp(2, 1, 1, "A read");
    // B: a read between writes clears TD under DELAYED
    cpu_op(0, 1, 0, 0);          expect_hp(0, 0, 0, "B read miss");
    cpu_op(1, 1, 0, 64'hB1);     expect_hp(2, 2, 2, "B write 1");
    cpu_op(0, 1, 0, 0);          expect_hp(2, 1, 2, "B read");
    cpu_op(1, 1, 1, 64'hB2);     expect_hp(2, 1, 2, "B write 2");
    cpu_op(1, 1, 2, 64'hB3);     expect_hp(2, 1, 2, "B write 3");
    cpu_op(0, 1, 2, 0);          expect_hp(2, 1, 1, "B read after move");
    // C: write miss fills SRAM in M; remote reads: M->O, then TD, then move under DELAYED
    cpu_op(1, 2, 5, 64'hC1);     expect_hp(0, 0, 0, "C write miss");
    cpu_op(0, 2, 5, 0);          expect_hp(1, 1, 1, "C write fill place");
    snp_op(SNP_RD, 2, 0, 0, hv, sv);
    check(hv[0] && hv[1] && hv[2] && sv[0] && sv[1] && sv[2], "C remote read supplied by M");
    snp_op(SNP_RD, 2, 0, 0, hv, sv);
    check(sv[0] && sv[1] && sv[2], "C remote read supplied by O");
    snp_op(SNP_RD, 2, 0, 0, hv, sv);
    cpu_op(0, 2, 5, 0);          expect_hp(1, 1, 2, "C after three remote reads");
    // D: a remote update of an O block in SRAM leaves S, which IMM moves to STT-RAM
    cpu_op(1, 3, 0, 64'hD1);     expect_hp(0, 0, 0, "D write miss");
    snp_op(SNP_RD, 3, 0, 0, hv, sv);
    snp_op(SNP_UPD, 3, 6, 64'hD2, hv, sv);
    check(hv[0] && hv[1] && hv[2], "D update hits");
    cpu_op(0, 3, 6, 0);          expect_hp(1, 2, 1, "D after remote update");
    // E: read with a remote sharer fills S; a write then broadcasts an update
    snp_op(SNP_RD, 4, 0, 0, hv, sv);
    check(!hv[0] && !hv[1] && !hv[2], "E not cached yet");
    cpu_op(0, 4, 0, 0);          expect_hp(0, 0, 0, "E read miss");
    r = n_upd[0];
    cpu_op(1, 4, 1, 64'hE1);     expect_hp(2, 2, 2, "E write to S");
    check(n_upd[0] == r + 1, "E write to S broadcasts an update");
    cpu_op(0, 4, 1, 0);          expect_hp(2, 1, 2, "E read after write");
    snp_op(SNP_RD, 4, 0, 0, hv, sv);
    check(sv[0] && sv[1] && sv[2], "E owner (O) supplies");
    // F: a remote write miss invalidates
    snp_op(SNP_RDX, 4, 2, 64'hF1, hv, sv);
    check(hv[0] && hv[1] && hv[2], "F invalidation hits");
    cpu_op(0, 4, 2, 0);          expect_hp(0, 0, 0, "F read after invalidation");

    // random traffic
    for (int n = 0; n < 1500; n++) begin
      l = $urandom_range(NL - 1); wd = $urandom_range(7); r = $urandom_range(99);
      if (r < 40)      cpu_op(0, l, wd, 0);
      else if (r < 72) cpu_op(1, l, wd, {$urandom, $urandom});
      else if (r < 82) snp_op(SNP_RD, l, wd, 0, hv, sv);
      else if (r < 92) begin
        snp_op(SNP_RD, l, wd, 0, hv, sv);
        snp_op(SNP_UPD, l, wd, {$urandom, $urandom}, hv, sv);
      end else snp_op(SNP_RDX, l, wd, {$urandom, $urandom}, hv, sv);
    end
    // read everything back
    for (int i = 0; i < NL; i++)
      for (int k = 0; k < 8; k++) cpu_op(0, i, k, 0);

    check(lat_checked > 1000, "enough latency samples");
    check(n_m2r[0] == 0 && n_m2s[0] == 0, "naive policy never moves");
    for (int i = 1; i < ND; i++)
      check(n_m2r[i] > 0 && n_m2s[i] > 0, $sformatf("copy %0d moves both ways", i));
    for (int i = 0; i < ND; i++) begin
      check(n_wb[i] > 0 && n_upd[i] > 0, $sformatf("copy %0d write-backs and updates", i));
      expect_ref = int'(cyc) / REF_INT;
      check(n_ref[i] >= expect_ref - 2 && n_ref[i] <= expect_ref,
            $sformatf("copy %0d refreshes %0d expected about %0d", i, n_ref[i], expect_ref));
      $display("policy %0d: hits sram=%0d stt=%0d misses=%0d moves to sram=%0d to stt=%0d wb=%0d upd=%0d refresh=%0d",
               i, n_hr[i], n_hs[i], n_miss[i], n_m2r[i], n_m2s[i], n_wb[i], n_upd[i], n_ref[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
