// tb_cpu_random: random programs on the CPU at its default sizes, checked
// against the instruction-level model of tb_iss_pkg.
//
// Each of NRUNS programs starts with a prelude that puts random values in
// 16 data-memory words with ori/sw, followed by random add, sub, ori, lw,
// sw, beq and j instructions (branch and jump targets stay inside the
// program; loads and stores use those 16 words) and a few encodings outside
// the subset, which must only advance the PC. The CPU is reset, loaded and
// run for MAXCYC cycles or until it reaches the closing jump-to-self (a
// backward beq may loop for good, so not every run ends there); every
// cycle the PC, and after every edge all registers and any stored word, are
// compared with the model. Each mechanism must occur at least once.
module tb_cpu_random;
  import cpu_pkg::*;
  import tb_asm_pkg::*;
  import tb_iss_pkg::*;
  localparam int NRUNS  = 8;
  localparam int NBODY  = 200;
  localparam int MAXCYC = 3000;

  logic        clk = 0, rst_n = 0, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0, pc, instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0, cycles = 0, n_unknown = 0, n_parked = 0;
  int t_add = 0, t_sub = 0, t_ori = 0, t_lw = 0, t_sw = 0, t_bt = 0, t_bn = 0, t_j = 0;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fail(string s);
    failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycles, s);
  endtask

  function automatic int rr(); return $urandom % 32; endfunction

  task automatic make_program(output int n);
    int k = 0, body0, body1;
    for (int w = 0; w < 16; w++) begin
      P[k++] = a_ori(1, 0, int'($urandom % 65536));
      P[k++] = a_sw (1, 0, w * 4);
    end
    body0 = k; body1 = k + NBODY;      // body1 is the closing jump
    for (int b = 0; b < NBODY; b++) begin
      int sel, rs, rt;
      sel = $urandom % 20; rs = rr(); rt = rr();
      case (sel)
        0, 1, 2:  P[k] = a_add(rr(), rs, rt);
        3, 4, 5:  P[k] = a_sub(rr(), rs, rt);
        6, 7, 8:  P[k] = a_ori(rt, rs, int'($urandom % 65536));
        9, 10:    P[k] = a_lw (rt, 0, int'($urandom % 16) * 4);
        11, 12:   P[k] = a_sw (rt, 0, int'($urandom % 16) * 4);
        13, 14, 15: begin
          int tgt;
          tgt = body0 + int'($urandom % (NBODY + 1));
          if ($urandom % 2 == 0) rt = rs;          // equal registers: taken
          P[k] = a_beq(rs, rt, tgt - (k + 1));
        end
        16, 17: P[k] = a_j(k + 1 + int'($urandom % (body1 - k)));  // forward only
        18: P[k] = {6'h3F, 26'($urandom)};                            // not in the subset
        default: P[k] = {6'h00, 20'($urandom), 6'h3F};                // R-type, unknown funct
      endcase
      k++;
    end
    P[k] = a_j(k); k++;
    n = k;
  endtask

  initial begin
    for (int run = 0; run < NRUNS; run++) begin
      int n;
      bit park;
      rst_n = 0;
      make_program(n);
      iss_reset();
      for (int w = 0; w < n; w++) begin
        @(negedge clk); prog_we = 1; prog_addr = w * 4; prog_wdata = P[w];
      end
      @(negedge clk); prog_we = 0;
      @(negedge clk); rst_n = 1;
      cycles = 0;
      park = 0;
      while (!park && cycles < MAXCYC) begin
        logic [31:0] i, waddr;
        checks++;
        if (pc !== ipc) fail($sformatf("pc %h, model %h", pc, ipc));
        i = P[int'(ipc[31:2])];
        if (i[31:26] == 6'h3F || (i[31:26] == 6'h00 && i[5:0] == 6'h3F)) n_unknown++;
        waddr = R[i[25:21]] + {{16{i[15]}}, i[15:0]};
        park = iss_step();
        @(posedge clk); #1; cycles++;
        for (int r = 1; r < 32; r++) begin
          checks++;
          if (dut.u_dp.u_regfile.regs[r] !== R[r])
            fail($sformatf("R%0d = %h, model %h", r, dut.u_dp.u_regfile.regs[r], R[r]));
        end
        if (i[31:26] == 6'h2B) begin
          checks++;
          if (dut.u_dp.u_dmem.mem[waddr[11:2]] !== M[waddr])
            fail($sformatf("M[%h] = %h, model %h", waddr, dut.u_dp.u_dmem.mem[waddr[11:2]], M[waddr]));
        end
        @(negedge clk);
      end
      if (park) n_parked++;
      t_add += n_add; t_sub += n_sub; t_ori += n_ori; t_lw += n_lw;
      t_sw += n_sw; t_bt += n_bt; t_bn += n_bn; t_j += n_j;
    end
    checks++; if (t_add == 0) fail("no add");
    checks++; if (t_sub == 0) fail("no sub");
    checks++; if (t_ori == 0) fail("no ori");
    checks++; if (t_lw  == 0) fail("no lw");
    checks++; if (t_sw  == 0) fail("no sw");
    checks++; if (t_bt  == 0) fail("no taken beq");
    checks++; if (t_bn  == 0) fail("no untaken beq");
    checks++; if (t_j   == 0) fail("no jump");
    checks++; if (n_unknown == 0) fail("no unknown encoding");
    checks++; if (n_parked == 0) fail("no program reached its closing jump");
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d unknown=%0d parked=%0d of %0d",
             t_add, t_sub, t_ori, t_lw, t_sw, t_bt, t_bn, t_j, n_unknown, n_parked, NRUNS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
