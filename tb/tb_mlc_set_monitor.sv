// tb_mlc_set_monitor -- checks the reference-counter update on hits and the
// zero count, pattern, protection bit and switch decision on misses, for
// random set contents in both modes, against an independent model.
module tb_mlc_set_monitor;
  localparam int WAYS = 8;
  logic mode, pb, hit, hit_half, pattern, reconfig, pb_new;
  logic [WAYS-1:0] valid;
  logic [WAYS-1:0][1:0] rc0, rc1, rc0_new, rc1_new;
  logic [2:0] hit_way;
  logic [4:0] zeros;
  mlc_set_monitor dut (.*);
  int checks = 0, failures = 0, n_rec = 0, n_promote = 0;
  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      int z, e0[WAYS], e1[WAYS], t;
      bit pat;
      mode = 1'($urandom); pb = 1'($urandom); hit = 1'($urandom); hit_half = 1'($urandom);
      valid = 8'($urandom | $urandom); hit_way = 3'($urandom);
      for (int w = 0; w < WAYS; w++) begin
        rc0[w] = ($urandom % 3 == 0) ? 2'd0 : 2'($urandom);
        rc1[w] = ($urandom % 3 == 0) ? 2'd0 : 2'($urandom);
      end
      valid[hit_way] = valid[hit_way] | hit;
      #1;
      z = 0;
      for (int w = 0; w < WAYS; w++) if (valid[w]) z += (rc0[w] == 0) + (!mode && rc1[w] == 0);
      pat = mode ? (z > 4) : (z > 0 && z < 4);
      check(zeros == 5'(z), "zero count");
      check(pattern == pat, "pattern");
      if (!hit) begin
        check(reconfig == (pat && pb), "reconfigure decision");
        check(pb_new == (pat && !pb), "protection bit");
        n_rec += reconfig;
      end else check(!reconfig && pb_new == pb, "no decision on hits");
      for (int w = 0; w < WAYS; w++) begin e0[w] = rc0[w]; e1[w] = rc1[w]; end
      if (hit) begin
        bit up;
        up = hit_half && !mode;
        t = up ? rc1[hit_way] : rc0[hit_way];
        if (t > 0) begin if (up) e1[hit_way]--; else e0[hit_way]--; end
        else begin
          n_promote++;
          for (int w = 0; w < WAYS; w++) if (valid[w]) begin
            if (!(w == hit_way && !up) && e0[w] < 3) e0[w]++;
            if (!mode && !(w == hit_way && up) && e1[w] < 3) e1[w]++;
          end
        end
      end
      for (int w = 0; w < WAYS; w++)
        check(rc0_new[w] == 2'(e0[w]) && rc1_new[w] == 2'(e1[w]), $sformatf("counters way %0d", w));
    end
    check(n_rec > 0 && n_promote > 0, "switches and promotions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
