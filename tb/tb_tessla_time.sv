// tb_tessla_time: time(x) must carry an event exactly where x has one, with
// the current progress timestamp as its value.
module tb_tessla_time;
  import rvmon_pkg::*;
  stream_t x, y;
  logic [31:0] now;
  int checks = 0, failures = 0;

  tessla_time dut (.x, .now, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    now = 32'd100;
    for (int i = 0; i < 500; i++) begin
      x.valid = $urandom % 2;
      x.value = $urandom;
      now     = now + 32'($urandom % 3);
      #1;
      checks++;
      if (y.valid !== x.valid || (x.valid && y.value !== now)) begin
        failures++;
        $display("x.valid=%b now=%0d -> y %b %0d", x.valid, now, y.valid, y.value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
