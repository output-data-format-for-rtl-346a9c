// tb_scac_status: self-checking test of the SCAC status byte.
//
// Random condition pulses and random readout moments. A reference set of
// pending bits, kept independently, is compared with the status byte at
// every readout: each condition must show up in exactly the first readout
// at or after its pulse, bit 8 must follow the chip ID input, and between
// readouts pending bits must stay set.
module tb_scac_status;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] cond;
  logic chip_id, take;
  logic [7:0] status;

  int checks = 0, failures = 0, ntake = 0, nreported = 0;
  logic [6:0] pend;

  scac_status dut (.clk, .rst_n, .cond, .chip_id, .take, .status);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (!rst_n) begin
      pend = '0;
    end else begin
      check(status == {chip_id, pend | cond}, "status byte");
      if (take) begin
        ntake++;
        if ((pend | cond) != 0) nreported++;
        pend = '0;
      end else begin
        pend = pend | cond;
      end
    end
  end

  always @(posedge clk) begin
    cond    <= ($urandom_range(0, 4) == 0) ? 7'(1 << $urandom_range(0, 6)) : 7'd0;
    take    <= ($urandom_range(0, 9) == 0);
    chip_id <= ($urandom_range(0, 20) == 0) ? ~chip_id : chip_id;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chip_id = 1'b0;
    repeat (3) @(posedge clk);
    @(posedge clk) rst_n <= 1'b1;
    wait (ntake == 200);
    check(nreported > 0, "some readout carried a condition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
