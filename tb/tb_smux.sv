// tb_smux: self-checking test of the 2:1 SMUX.
//
// Random 32-bit input words and DAV pairs change once per 40 MHz cycle, as
// the GSEL serializers do (right after each clock enable edge). After each
// sample point the test expects, in the next two 80 MHz cycles, first the
// lines of ADCs 1-8 with FLAG = 1 and the DAV of the first half, then the
// lines of ADCs 9-16 with FLAG = 0 and the DAV of the second half.
module tb_smux;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [31:0] din;
  logic [1:0]  dav_n_in;
  logic [15:0] dout;
  logic flag, dav_n;

  int checks = 0, failures = 0, nsamp = 0;
  logic [31:0] s_din;
  logic [1:0]  s_dav;
  int phase = -1;

  smux dut (.clk, .rst_n, .ce, .din, .dav_n_in, .dout, .flag, .dav_n);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) ce <= ~ce;

  always @(posedge clk) begin
    if (!rst_n || ce) begin
      din      <= $urandom;
      dav_n_in <= 2'($urandom);
    end
  end

  // check on the falling edge, when the registered outputs are settled
  always @(negedge clk) if (rst_n) begin
    if (phase == 0) begin
      check(dout == s_din[15:0] && flag == 1'b1 && dav_n == s_dav[0], "low half");
      phase = 1;
    end else if (phase == 1) begin
      check(dout == s_din[31:16] && flag == 1'b0 && dav_n == s_dav[1], "high half");
      phase = -1;
    end
  end

  always @(posedge clk) if (rst_n && ce) begin
    s_din = din;
    s_dav = dav_n_in;
    phase = 0;
    nsamp++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (nsamp == 500);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
