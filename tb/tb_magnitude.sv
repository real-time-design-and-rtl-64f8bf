// Testbench for magnitude: random and extreme complex inputs; the output must be the
// integer square root r of re^2+im^2 (r^2 <= v < (r+1)^2, checked with 64-bit
// integers), one cycle after in_v, with the bin index carried along.
module tb_magnitude;
  import mtd_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_v = 1'b0, out_v;
  logic [BIN_W-1:0] in_idx, out_idx;
  cpx_a_t din;
  logic [MAG_W-1:0] mag;
  int checks = 0, failures = 0;

  magnitude dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint re, im, v, r;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin re = -(1 <<< 20); im = -(1 <<< 20); end
        1: begin re = (1 <<< 20) - 1; im = 0; end
        2: begin re = 0; im = 0; end
        3: begin re = 3; im = 4; end
        default: begin
          re = longint'($signed(ACC_W'($urandom)));
          im = (i % 3 == 0) ? longint'($signed(ACC_W'($urandom))) >>> ($urandom % 20)
                            : longint'($signed(ACC_W'($urandom)));
        end
      endcase
      din.re = ACC_W'(re);
      din.im = ACC_W'(im);
      in_idx = BIN_W'(i);
      in_v = 1'b1;
      v = re * re + im * im;
      @(negedge clk);
      in_v = 1'b0;
      r = longint'(mag);
      checks++;
      if (!out_v || r * r > v || (r + 1) * (r + 1) <= v || out_idx != BIN_W'(i)) begin
        failures++;
        if (failures < 10) $display("FAIL re=%0d im=%0d got %0d", re, im, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
