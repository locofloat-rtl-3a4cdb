// tb_loco_resize: self-checking test of the width converter, narrowing 50 to
// 25 bits (the default, as used where a state variable enters the 8/25
// datapath) and widening 25 to 50 bits. The represented value, computed as a
// real by the testbench, must be kept within one LSB of the narrow result on
// narrowing, with truncation towards minus infinity. Widening must append 25
// zero LSBs and raise the point location by 25, or flush to zero at +127 when
// the point location would pass +127.
module tb_loco_resize;
  import loco_pkg::*;
  import loco_tb_pkg::*;
  logic signed [49:0] n_in, w_out;
  logic signed [24:0] n_out, w_in;
  pl_t n_pl_in, n_pl_out, w_pl_in, w_pl_out;
  int checks = 0, failures = 0;

  loco_resize dut_n (.din(n_in), .pl_in(n_pl_in), .dout(n_out), .pl_out(n_pl_out));
  loco_resize #(.WI(25), .WO(50)) dut_w (.din(w_in), .pl_in(w_pl_in), .dout(w_out), .pl_out(w_pl_out));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one();
    real vi, vo, lsb;
      n_in = 50'({$urandom, $urandom});
      n_pl_in = pl_t'(($urandom % 100) + 27);
      w_in = 25'($urandom);
      w_pl_in = $signed(8'($urandom));
      #1;
      vi  = real'(longint'(n_in)) * pow2(-int'(n_pl_in));
      vo  = real'(longint'(n_out)) * pow2(-int'(n_pl_out));
      lsb = pow2(-int'(n_pl_out));
      checks++;
      if (!(vo <= vi && vi - vo < lsb) || int'(n_pl_out) != int'(n_pl_in) - 25) begin
        failures++;
        $display("FAIL narrow %0d/%0d -> %0d/%0d", n_in, n_pl_in, n_out, n_pl_out);
      end
      checks++;
      if (int'(w_pl_in) > 102 ? (w_out != '0 || w_pl_out != PL_MAX)
                              : (longint'(w_out) != (longint'(w_in) <<< 25) ||
                                 int'(w_pl_out) != int'(w_pl_in) + 25)) begin
        failures++;
        $display("FAIL widen %0d/%0d -> %0d/%0d", w_in, w_pl_in, w_out, w_pl_out);
      end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
