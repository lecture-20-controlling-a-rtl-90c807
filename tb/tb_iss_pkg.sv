// tb_iss_pkg: instruction-level reference model of the CPU for the
// testbenches. It holds the architectural state (PC, 32 registers, a sparse
// byte-addressed word memory and a copy of the program) and executes one
// instruction per call of iss_step, following the register transfers of
// add, sub, ori, lw, sw, beq and j. Register 0 stays 0; unknown encodings
// only advance the PC. It also counts how often each instruction (and each
// outcome of beq) was executed.
package tb_iss_pkg;
  logic [31:0] ipc;
  logic [31:0] R [32];
  logic [31:0] M [int];
  logic [31:0] P [int];
  int n_add, n_sub, n_ori, n_lw, n_sw, n_bt, n_bn, n_j;

  function automatic void iss_reset();
    ipc = 0;
    for (int r = 0; r < 32; r++) R[r] = 0;
    M.delete();
    n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_bt = 0; n_bn = 0; n_j = 0;
  endfunction

  // Executes the instruction at ipc; returns 1 if it is a jump to itself
  function automatic bit iss_step();
    logic [31:0] i = P[int'(ipc[31:2])];
    logic [31:0] a = R[i[25:21]], b = R[i[20:16]];
    logic [31:0] se = {{16{i[15]}}, i[15:0]}, ze = {16'h0, i[15:0]};
    logic [31:0] nxt = ipc + 4;
    bit park = 0;
    case (i[31:26])
      6'h00: begin
        if (i[5:0] == 6'h20)      begin if (i[15:11] != 0) R[i[15:11]] = a + b; n_add++; end
        else if (i[5:0] == 6'h22) begin if (i[15:11] != 0) R[i[15:11]] = a - b; n_sub++; end
      end
      6'h0D: begin if (i[20:16] != 0) R[i[20:16]] = a | ze; n_ori++; end
      6'h23: begin if (i[20:16] != 0) R[i[20:16]] = M[a + se]; n_lw++; end
      6'h2B: begin M[a + se] = b; n_sw++; end
      6'h04: begin
        if (a == b) begin nxt = ipc + 4 + {se[29:0], 2'b00}; n_bt++; end
        else n_bn++;
      end
      6'h02: begin
        nxt = {ipc[31:28], i[25:0], 2'b00};
        park = (nxt == ipc); n_j++;
      end
      default: ;
    endcase
    ipc = nxt;
    return park;
  endfunction
endpackage
