// tb_single_cycle_cpu: end-to-end test of the CPU at its default sizes.
//
// Loads a program that fills a 10-word array with sw, sums it back with lw
// and add in a loop closed by beq and j, stores and reloads the sum, tests
// a taken and an untaken beq, zero extension in ori, a negative (sign-
// extended) load offset and a write to register 0, then parks in a jump to
// itself. The instruction-level model of tb_iss_pkg executes the same
// program in lockstep: every cycle the PC is compared, and after every
// clock edge all registers and the written memory word are compared, which
// also checks that every instruction completes in exactly one cycle. At the
// end the sum is checked against its closed form, and each mechanism
// (add, sub, ori, lw, sw, beq taken, beq not taken, jump) must have
// occurred at least once.
module tb_single_cycle_cpu;
  import cpu_pkg::*;
  import tb_asm_pkg::*;
  import tb_iss_pkg::*;
  localparam int NPROG = 29;
  localparam int MAXCYC = 2000;

  logic        clk = 0, rst_n = 0, prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0, pc, instr;
  ctrl_t       ctrl;

  int checks = 0, failures = 0, cycles = 0;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fail(string s);
    failures++; $display("FAIL cycle %0d: %s", cycles, s);
  endtask

  initial begin
    automatic int k = 0;
    // array fill: M[4*j] = 0x1234 + 4*j, j = 0..9
    P[k++] = a_ori(2, 0, 10);         // 0  count
    P[k++] = a_ori(3, 0, 0);          // 1  pointer
    P[k++] = a_ori(5, 0, 1);          // 2  one
    P[k++] = a_ori(6, 0, 4);          // 3  four
    P[k++] = a_ori(7, 0, 'h1234);     // 4  value
    P[k++] = a_sw (7, 3, 0);          // 5  fill:
    P[k++] = a_add(7, 7, 6);          // 6
    P[k++] = a_add(3, 3, 6);          // 7
    P[k++] = a_sub(2, 2, 5);          // 8
    P[k++] = a_beq(2, 0, 1);          // 9  done -> 11
    P[k++] = a_j  (5);                // 10
    P[k++] = a_ori(2, 0, 10);         // 11 sum loop setup
    P[k++] = a_ori(3, 0, 0);          // 12
    P[k++] = a_ori(8, 0, 0);          // 13
    P[k++] = a_lw (9, 3, 0);          // 14 sum:
    P[k++] = a_add(8, 8, 9);          // 15
    P[k++] = a_add(3, 3, 6);          // 16
    P[k++] = a_sub(2, 2, 5);          // 17
    P[k++] = a_beq(2, 0, 1);          // 18 done -> 20
    P[k++] = a_j  (14);               // 19
    P[k++] = a_sw (8, 0, 'h100);      // 20 store the sum
    P[k++] = a_lw (10, 0, 'h100);     // 21 and read it back
    P[k++] = a_sub(11, 10, 8);        // 22 = 0
    P[k++] = a_beq(11, 0, 1);         // 23 taken -> 25
    P[k++] = a_ori(12, 0, 'hDEAD);    // 24 skipped
    P[k++] = a_ori(13, 0, 'hFFFF);    // 25 zero-extended
    P[k++] = a_lw (14, 3, -4);        // 26 negative offset: last array word
    P[k++] = a_add(0, 13, 13);        // 27 write to r0 is dropped
    P[k++] = a_j  (28);               // 28 park

    iss_reset();
    for (int w = 0; w < NPROG; w++) begin
      @(negedge clk); prog_we = 1; prog_addr = w * 4; prog_wdata = P[w];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst_n = 1;

    forever begin
      logic [31:0] i;
      bit park;
      logic [31:0] waddr;
      checks++;
      if (pc !== ipc) fail($sformatf("pc %h, model %h", pc, ipc));
      i = P[int'(ipc[31:2])];
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
      if (park || cycles >= MAXCYC) break;
    end

    // closed-form results
    checks++; if (R[8] !== 32'd10 * 32'h1234 + 32'd180) fail("model sum");
    checks++; if (dut.u_dp.u_regfile.regs[8]  !== 32'd10 * 32'h1234 + 32'd180) fail("sum");
    checks++; if (dut.u_dp.u_regfile.regs[12] !== 32'h0)        fail("skipped ori executed");
    checks++; if (dut.u_dp.u_regfile.regs[13] !== 32'h0000_FFFF) fail("ori zero extension");
    checks++; if (dut.u_dp.u_regfile.regs[14] !== 32'h1234 + 32'd36) fail("negative offset load");
    checks++; if (cycles >= MAXCYC) fail("program did not reach its end");
    // every mechanism must have happened
    checks++; if (n_add == 0) fail("no add");
    checks++; if (n_sub == 0) fail("no sub");
    checks++; if (n_ori == 0) fail("no ori");
    checks++; if (n_lw  == 0) fail("no lw");
    checks++; if (n_sw  == 0) fail("no sw");
    checks++; if (n_bt  == 0) fail("no taken beq");
    checks++; if (n_bn  == 0) fail("no untaken beq");
    checks++; if (n_j   == 0) fail("no jump");
    $display("cycles=%0d add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d",
             cycles, n_add, n_sub, n_ori, n_lw, n_sw, n_bt, n_bn, n_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
