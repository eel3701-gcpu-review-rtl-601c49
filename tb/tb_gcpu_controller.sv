// tb_gcpu_controller: self-checking test of the G-CPU controller.
// For every one of the 64 opcodes, and for each flag combination, it runs
// the controller from FETCH until it returns to FETCH and checks, from the
// control lines alone:
//   - the cycle count per addressing mode (inherent 2, immediate 3,
//     16-bit immediate 4, indexed 4, extended 5, 16-bit extended 6,
//     branch 3; unused opcodes 2);
//   - IR_LD only in the first cycle, INC_PC in the second;
//   - the number of PC increments (instruction length), a PC_L load for a
//     taken branch and never a PC_H load;
//   - the memory access: how many read loads / write cycles to A, B, X, Y,
//     Xdisp, Ydisp, MAR, with which address source;
//   - R/-W high and A, B held whenever the instruction does not use them.
module tb_gcpu_controller;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1;
  opcode_t ir = '0;
  logic z = 0, n = 0;
  ctrl_t ctrl;
  logic [2:0] state;
  int checks = 0, failures = 0;

  gcpu_controller dut (.clk, .rst, .ir, .z, .n, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, int op);
    checks++;
    if (!ok) begin
      failures++;
      $display("opcode %h z=%b n=%b: %s", op, z, n, what);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int fl = 0; fl < 4; fl++) begin
      for (int op = 0; op < 64; op++) begin
        int cyc, pcinc, pcldl, pcldu, wr, wr_sel, lda, ldb, lda_sel, ldb_sel;
        int xl, xu, yl, yu, xinc, yinc, xd, yd, marl, maru, marinc, alu_a, movab;
        int e_cyc, e_len;
        bit taken;
        {z, n} = 2'(fl);
        ir = opcode_t'(op);
        cyc = 0; pcinc = 0; pcldl = 0; pcldu = 0; wr = 0; wr_sel = -1;
        lda = 0; ldb = 0; lda_sel = -1; ldb_sel = -1; xl = 0; xu = 0; yl = 0; yu = 0;
        xinc = 0; yinc = 0; xd = 0; yd = 0; marl = 0; maru = 0; marinc = 0;
        alu_a = 0; movab = 0;
        do begin
          #1;
          if (cyc == 0) check(ctrl.ir_ld == 1 && state == 0, "no IR_LD in first cycle", op);
          else check(ctrl.ir_ld == 0, "IR_LD outside fetch", op);
          if (cyc == 1) check(ctrl.pc_inc == 1, "no INC_PC in decode", op);
          pcinc += int'(ctrl.pc_inc); pcldl += int'(ctrl.pc_ld_l); pcldu += int'(ctrl.pc_ld_u);
          if (!ctrl.rw) begin wr++; wr_sel = int'(ctrl.addr_sel); end
          if (ctrl.msa == MSA_BUS) begin lda++; lda_sel = int'(ctrl.addr_sel); end
          if (ctrl.msb == MSB_BUS) begin ldb++; ldb_sel = int'(ctrl.addr_sel); end
          if (ctrl.msa == MSA_ALU) alu_a++;
          if (ctrl.msa == MSA_B || ctrl.msb == MSB_A) movab++;
          xl += int'(ctrl.x_ld_l); xu += int'(ctrl.x_ld_u);
          yl += int'(ctrl.y_ld_l); yu += int'(ctrl.y_ld_u);
          xinc += int'(ctrl.x_inc); yinc += int'(ctrl.y_inc);
          xd += int'(ctrl.xd_ld); yd += int'(ctrl.yd_ld);
          marl += int'(ctrl.mar_ld_l); maru += int'(ctrl.mar_ld_u); marinc += int'(ctrl.mar_inc);
          @(posedge clk);
          cyc++;
          #1;
        end while (state != 0 && cyc < 20);

        // Expected cycle count and instruction length, from the charts.
        taken = 0;
        if (op <= 1 || op == 6'h14 || op == 6'h15 || (op >= 6'h22 && op <= 6'h2F)) begin
          e_cyc = 2; e_len = 1;
        end else if (op == 2 || op == 3) begin e_cyc = 3; e_len = 2;
        end else if (op >= 4 && op <= 7) begin e_cyc = 5; e_len = 3;
        end else if (op == 8 || op == 9) begin e_cyc = 4; e_len = 3;
        end else if (op == 10 || op == 11) begin e_cyc = 6; e_len = 3;
        end else if (op >= 6'h0C && op <= 6'h13) begin e_cyc = 4; e_len = 2;
        end else if (op == 6'h18 || op == 6'h19) begin
          e_cyc = 3;
          taken = (op == 6'h18) ? z : !n;
          e_len = taken ? 1 : 2;
        end else begin e_cyc = 2; e_len = 1; end
        check(cyc == e_cyc, $sformatf("took %0d cycles, expected %0d", cyc, e_cyc), op);
        check(pcinc == e_len, $sformatf("%0d PC increments, expected %0d", pcinc, e_len), op);
        check(pcldl == int'(taken) && pcldu == 0, "wrong PC load", op);

        // Accumulator loads and stores.
        begin
          int e_lda, e_ldb, e_wr, e_sel;
          e_lda = 0; e_ldb = 0; e_wr = 0; e_sel = 0;
          case (op)
            2: e_lda = 1;
            3: e_ldb = 1;
            4: begin e_lda = 1; e_sel = 1; end
            5: begin e_ldb = 1; e_sel = 1; end
            6, 7: begin e_wr = 1; e_sel = 1; end
            6'h0C, 6'h0D: begin e_lda = 1; e_sel = 2 + op % 2; end
            6'h0E, 6'h0F: begin e_ldb = 1; e_sel = 2 + op % 2; end
            6'h10, 6'h11, 6'h12, 6'h13: begin e_wr = 1; e_sel = 2 + op % 2; end
            default: ;
          endcase
          check(lda == e_lda && ldb == e_ldb && wr == e_wr, "wrong accumulator access", op);
          if (e_lda) check(lda_sel == e_sel, "A loaded from wrong address source", op);
          if (e_ldb) check(ldb_sel == e_sel, "B loaded from wrong address source", op);
          if (e_wr)  check(wr_sel == e_sel, "store to wrong address source", op);
        end

        // Index, displacement and MAR activity.
        begin
          bit isx16, isy16, ext;
          isx16 = (op == 8 || op == 10);
          isy16 = (op == 9 || op == 11);
          ext   = (op >= 4 && op <= 7) || op == 10 || op == 11;
          check(xl == int'(isx16) && xu == int'(isx16), "X byte loads", op);
          check(yl == int'(isy16) && yu == int'(isy16), "Y byte loads", op);
          check(marl == int'(ext) && maru == int'(ext), "MAR byte loads", op);
          check(marinc == int'(op == 10 || op == 11), "MAR increments", op);
          check(xinc == int'(op == 6'h14) && yinc == int'(op == 6'h15), "index increments", op);
          check(xd == int'(op >= 6'h0C && op <= 6'h13 && op % 2 == 0) &&
                yd == int'(op >= 6'h0C && op <= 6'h13 && op % 2 == 1), "displacement loads", op);
          check(alu_a == int'(op >= 6'h22 && op <= 6'h2F), "ALU result into A", op);
          check(movab == int'(op <= 1), "A/B transfer", op);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
