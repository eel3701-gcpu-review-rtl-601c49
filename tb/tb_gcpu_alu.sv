// tb_gcpu_alu: self-checking test of the ALU and its A/B registers.
// Each cycle it applies random MSA, MSB and MSC codes and a random bus
// value, and checks MUXC, the new A and B, and the Z/N flags against a
// reference written with integer arithmetic in this file. It also checks
// that every one of the 16 functions was exercised.
module tb_gcpu_alu;
  import gcpu_pkg::*;

  logic clk = 0, rst = 1;
  msa_e msa = MSA_HOLD;
  msb_e msb = MSB_HOLD;
  alu_fn_e msc = ALU_PASSA;
  byte_t bus = '0, c_out, reg_a, reg_b;
  logic z, n;
  int checks = 0, failures = 0;
  int fn_seen[16];

  gcpu_alu dut (.clk, .rst, .msa, .msb, .msc, .bus_in(bus), .c_out,
                .reg_a, .reg_b, .z, .n);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_fn(int unsigned f, int unsigned a, int unsigned b);
    int signed sa;
    sa = (a >= 128) ? int'(a) - 256 : int'(a);
    case (f)
      0:  return a;
      1:  return b;
      2:  return (a + b) % 256;
      3:  return (a + 256 - b) % 256;
      4:  return a & b;
      5:  return a | b;
      6:  return a ^ b;
      7:  return 255 - a;
      8:  return (256 - a) % 256;
      9:  return (a * 2) % 256;
      10: return a / 2;
      11: return (sa < 0) ? (a / 2) + 128 : a / 2;
      12: return ((a * 2) % 256) + a / 128;
      13: return a / 2 + (a % 2) * 128;
      14: return (a + 1) % 256;
      default: return (a + 255) % 256;
    endcase
  endfunction

  initial begin
    int unsigned ea, eb, ec;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ea = 0; eb = 0;
    for (int i = 0; i < 4000; i++) begin
      msa = msa_e'($urandom % 4);
      msb = msb_e'($urandom % 4);
      msc = alu_fn_e'($urandom % 16);
      bus = byte_t'($urandom);
      #1;
      ec = ref_fn(int'(msc), ea, eb);
      fn_seen[int'(msc)]++;
      checks++;
      if (int'(c_out) != ec) begin
        failures++; $display("fn %0d a=%h b=%h c=%h exp %h", msc, ea, eb, c_out, ec);
      end
      checks++;
      if (z != (ea == 0) || n != (ea >= 128)) begin
        failures++; $display("flags z=%b n=%b for a=%h", z, n, ea);
      end
      @(posedge clk);
      begin
        int unsigned na, nb;
        case (int'(msa)) 0: na = ea; 1: na = bus; 2: na = eb; default: na = ec; endcase
        case (int'(msb)) 0: nb = eb; 1: nb = bus; 2: nb = ea; default: nb = ec; endcase
        ea = na; eb = nb;
      end
      @(negedge clk);
      checks++;
      if (int'(reg_a) != ea || int'(reg_b) != eb) begin
        failures++; $display("regs a=%h b=%h exp %h %h", reg_a, reg_b, ea, eb);
      end
    end
    for (int f = 0; f < 16; f++) begin
      checks++;
      if (fn_seen[f] == 0) begin failures++; $display("function %0d never used", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
