// tb_cvp_cmul: self-checking test of the CVP complex multiplier.
// Random and corner operands in complex/dual-real and fractional/integer
// modes, one new operand set per clock; each result is expected exactly
// three clocks later, computed here with 128-bit arithmetic.
module tb_cvp_cmul;
  import cvp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [31:0] a, b, c, d;
  mul_ctrl_t ctrl;
  prod_t p;
  int checks = 0, failures = 0;

  cvp_cmul dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [32:0] ref_scale(input logic signed [127:0] v, input logic im);
    logic signed [127:0] w;
    w = im ? v : (v >>> 31);
    if (w > 128'sd4294967295) w = 128'sd4294967295;
    if (w < -128'sd4294967296) w = -128'sd4294967296;
    return w[32:0];
  endfunction

  prod_t exp_q [$];
  localparam int LAT = 3;

  task automatic drive(input logic signed [31:0] ia, ib, ic, id, input logic im, dr);
    logic signed [127:0] ar, br, cr, dr_;
    prod_t e;
    a = ia; b = ib; c = ic; d = id; ctrl.integer_mode = im; ctrl.dual_real = dr;
    ar = 128'(ia); br = 128'(ib); cr = 128'(ic); dr_ = 128'(id);
    if (dr) begin
      e.re = ref_scale(ar * cr, im);
      e.im = ref_scale(br * dr_, im);
    end else begin
      e.re = ref_scale(ar * cr - br * dr_, im);
      e.im = ref_scale(ar * dr_ + br * cr, im);
    end
    exp_q.push_back(e);
  endtask

  initial begin
    a = 0; b = 0; c = 0; d = 0; ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Flush: LAT cycles of zeros expected to give zero.
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // check the result of the operands LAT cycles ago
      if (i >= LAT) begin
        prod_t e;
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mismatch %0d: got %h/%h exp %h/%h", i, p.re, p.im, e.re, e.im);
        end
      end
      case (i % 8)
        0: drive(32'sh4000_0000, 32'sh0, 32'sh4000_0000, 32'sh0, 0, 0);        // 0.5*0.5
        1: drive(32'sh8000_0000, 32'sh8000_0000, 32'sh8000_0000, 32'sh8000_0000, 0, 0); // saturating corner
        2: drive(32'sh8000_0000, 32'sh8000_0000, 32'sh8000_0000, 32'sh7fff_ffff, 0, 0);
        3: drive($urandom, $urandom, $urandom, $urandom, 1, 0);
        4: drive($urandom % 1000 - 500, $urandom % 1000 - 500, $urandom % 1000 - 500, $urandom % 1000 - 500, 1, 1);
        default: drive($urandom, $urandom, $urandom, $urandom, 1'($urandom), 1'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
