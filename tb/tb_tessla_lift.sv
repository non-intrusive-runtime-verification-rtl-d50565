// tb_tessla_lift: every operator of the lift node against a reference.
// Random event streams a and b drive one instance per operator; the
// testbench keeps the last value of each operand and expects an output
// event whenever a or b has one and both have been defined, valued
// f(latest a, latest b). Includes max(x1, x2), the example of the
// specification language, and a clr in the middle of the run.
module tb_tessla_lift;
  import rvmon_pkg::*;
  localparam int NOPS = 9;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  stream_t a, b;
  stream_t y [NOPS];
  int checks = 0, failures = 0, outs = 0;
  logic a_def = 0, b_def = 0;
  logic [31:0] a_v = 0, b_v = 0;

  localparam lift_op_e OPS [NOPS] = '{LIFT_ADD, LIFT_SUB, LIFT_GT, LIFT_GE, LIFT_LT,
                                      LIFT_LE, LIFT_EQ, LIFT_MAX, LIFT_ZERO_IF};

  for (genvar g = 0; g < NOPS; g++) begin : g_op
    tessla_lift #(.OP(OPS[g])) dut (.clk, .rst_n, .clr, .a, .b, .y(y[g]));
  end

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] f(input int op, input logic [31:0] x, input logic [31:0] z);
    case (op)
      0: return x + z;
      1: return x - z;
      2: return 32'(x > z);
      3: return 32'(x >= z);
      4: return 32'(x < z);
      5: return 32'(x <= z);
      6: return 32'(x == z);
      7: return (x > z) ? x : z;
      default: return (x != 0) ? 32'd0 : z;
    endcase
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      clr     = (c == 500);
      a.valid = ($urandom % 3) == 0;
      b.valid = ($urandom % 3) == 0;
      a.value = (c % 7 == 0) ? 32'd0 : ($urandom % 16);
      b.value = (c % 11 == 0) ? a.value : ($urandom % 16);
      if (a.valid) a_v = a.value;
      if (b.valid) b_v = b.value;
      #1;
      for (int k = 0; k < NOPS; k++) begin
        logic exp_v;
        exp_v = (a.valid || b.valid) && (a.valid || a_def) && (b.valid || b_def);
        checks++;
        if (y[k].valid !== exp_v || (exp_v && y[k].value !== f(k, a_v, b_v))) begin
          failures++;
          if (failures < 10) $display("op %0d cycle %0d: got %b %0d", k, c, y[k].valid, y[k].value);
        end
        if (exp_v) outs++;
      end
      @(posedge clk);
      if (clr) begin a_def = 0; b_def = 0; end
      else begin
        if (a.valid) a_def = 1;
        if (b.valid) b_def = 1;
      end
      #1;
    end
    checks++; if (outs < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
