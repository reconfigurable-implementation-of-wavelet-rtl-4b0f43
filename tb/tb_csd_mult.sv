// tb_csd_mult: checks each shift-add network against a plain multiplication
// by its constant (as a multiple of 2^-16), over random and extreme operands.
module tb_csd_mult;
  import dwt_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DW:0] x;
  acc_t p_a, p_b, p_g, p_d, p_k, p_ki;
  int checks = 0, failures = 0;

  csd_mult #(.COEF(C_ALPHA))     u_a  (.clk, .x, .prod(p_a));
  csd_mult #(.COEF(C_BETA))      u_b  (.clk, .x, .prod(p_b));
  csd_mult #(.COEF(C_GAMMA))     u_g  (.clk, .x, .prod(p_g));
  csd_mult #(.COEF(C_DELTA))     u_d  (.clk, .x, .prod(p_d));
  csd_mult #(.COEF(C_KAPPA))     u_k  (.clk, .x, .prod(p_k));
  csd_mult #(.COEF(C_KAPPA_INV)) u_ki (.clk, .x, .prod(p_ki));

  task automatic chk(string n, acc_t got, longint c, longint xv);
    checks++;
    if (got != acc_t'(c * xv)) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", n, xv, got, c * xv);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xv;
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: xv = 0;  1: xv = 1;  2: xv = -1;  3: xv = 65535;  4: xv = -65536;
        default: xv = longint'($signed(17'($urandom)));
      endcase
      @(negedge clk) x = (DW+1)'(xv);
      @(negedge clk);
      chk("alpha", p_a, -98304, xv);
      chk("beta",  p_b,   4096, xv);
      chk("gamma", p_g,  52416, xv);
      chk("delta", p_d,  30720, xv);
      chk("kappa", p_k,  74127, xv);
      chk("kinv",  p_ki, 57940, xv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
