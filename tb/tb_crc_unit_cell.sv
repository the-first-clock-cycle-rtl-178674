// tb_crc_unit_cell: checks one CRC register bit with and without the feedback XOR
// against its truth table (reset over valid over hold) for random inputs.
module tb_crc_unit_cell;
  logic clk = 1'b0;
  logic qin, feedback, crcin, valid, reset, init;
  logic q_tap, q_plain;
  logic e_tap, e_plain;
  int checks = 0, failures = 0;

  crc_unit_cell #(.TAP(1'b1)) dut_tap (.clk, .qin, .feedback, .crcin, .valid, .reset, .init, .q(q_tap));
  crc_unit_cell #(.TAP(1'b0)) dut_plain (.clk, .qin, .feedback, .crcin, .valid, .reset, .init, .q(q_plain));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {qin, feedback, crcin, valid, reset, init} = '0;
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b1; init = 1'b1;
    @(negedge clk);
    e_tap = 1'b1; e_plain = 1'b1;
    for (int n = 0; n < 500; n++) begin
      {qin, feedback, crcin, valid, reset, init} = 6'($urandom);
      if ($urandom % 4 != 0) reset = 1'b0;
      @(negedge clk);
      if (reset) begin
        e_tap = init; e_plain = init;
      end else if (valid) begin
        e_tap   = qin ^ feedback ^ crcin;
        e_plain = qin ^ crcin;
      end
      checks += 2;
      if (q_tap !== e_tap) begin
        failures++; $display("tap cell mismatch at %0d: %b vs %b", n, q_tap, e_tap);
      end
      if (q_plain !== e_plain) begin
        failures++; $display("plain cell mismatch at %0d: %b vs %b", n, q_plain, e_plain);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
