// tb_cvp_cacc: self-checking test of one complex accumulator.
// Every clock applies a random operation to a random pipeline value and
// compares the register with a reference written directly from the
// operation table (S as a function of s and t), 40-bit wrap-around.
module tb_cvp_cacc;
  import cvp_pkg::*;

  logic clk = 0, rst_n = 0;
  acc_op_e op;
  prod_t t;
  acc_t s;
  int checks = 0, failures = 0;
  int seen [18];

  cvp_cacc dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sr, si, tr, ti, er, ei;

  function automatic longint w40(input longint v);
    logic [39:0] x;
    x = v[39:0];
    return longint'(signed'(x));
  endfunction

  initial begin
    op = ACC_CLEAR; t = '0;
    sr = 0; si = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      op = acc_op_e'($urandom % 18);
      if (i % 50 == 0) op = ACC_CLEAR;
      t.re = 33'($urandom) ^ {$urandom % 2, 32'h0};
      t.im = 33'($urandom) ^ {$urandom % 2, 32'h0};
      tr = longint'(t.re); ti = longint'(t.im);
      case (op)
        ACC_CLEAR:    begin er = 0;       ei = 0;       end
        ACC_HOLD:     begin er = sr;      ei = si;      end
        ACC_LOAD:     begin er = tr;      ei = ti;      end
        ACC_LOADJ:    begin er = -ti;     ei = tr;      end
        ACC_CONJ:     begin er = tr;      ei = -ti;     end
        ACC_JCONJ:    begin er = ti;      ei = tr;      end
        ACC_NEG:      begin er = -tr;     ei = -ti;     end
        ACC_NEGJ:     begin er = ti;      ei = -tr;     end
        ACC_NEGCONJ:  begin er = -tr;     ei = ti;      end
        ACC_NEGJCONJ: begin er = -ti;     ei = -tr;     end
        ACC_ADD:      begin er = sr + tr; ei = si + ti; end
        ACC_ADDJ:     begin er = sr - ti; ei = si + tr; end
        ACC_ADDCONJ:  begin er = sr + tr; ei = si - ti; end
        ACC_ADDJCONJ: begin er = sr + ti; ei = si + tr; end
        ACC_SUB:      begin er = sr - tr; ei = si - ti; end
        ACC_SUBJ:     begin er = sr + ti; ei = si - tr; end
        ACC_SUBCONJ:  begin er = sr - tr; ei = si + ti; end
        ACC_SUBJCONJ: begin er = sr - ti; ei = si - tr; end
        default:      begin er = sr;      ei = si;      end
      endcase
      seen[int'(op)]++;
      sr = w40(er); si = w40(ei);
      @(negedge clk);
      checks++;
      if (longint'(s.re) != sr || longint'(s.im) != si) begin
        failures++;
        if (failures < 10) $display("op %s: got %0d,%0d exp %0d,%0d", op.name(), s.re, s.im, sr, si);
      end
    end
    for (int k = 0; k < 18; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
