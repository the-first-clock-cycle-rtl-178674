// tb_bufg_tpg: checks the clock-buffer TPG: I0 = 0 and I1 = 1 right after
// configuration, the twisted ring sequence (I1 follows I0 one clock later, period four
// clocks), and the eight control patterns, each held four clocks, in table order.
module tb_bufg_tpg;
  import bist_pkg::*;
  logic       clk = 1'b0, gsr = 1'b0;
  logic       i0, i1;
  bufg_ctrl_t ctrl;
  logic [2:0] state;
  logic       p0, p1;
  // Table of the control patterns, columns IG1 IG0 CE1 S1 CE0 S0
  logic [5:0] table_rows [8] = '{6'b001101, 6'b001110, 6'b001111, 6'b000000,
                                 6'b011111, 6'b101111, 6'b000111, 6'b001011};
  int checks = 0, failures = 0;

  bufg_tpg dut (.clk, .gsr, .i0, .i1, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 gsr = 1'b1;
    #11 gsr = 1'b0;
    checks += 2;
    if (i0 !== 1'b0 || i1 !== 1'b1) begin failures++; $display("initial I0/I1 %b%b", i0, i1); end
    if (ctrl !== table_rows[0]) failures++;
    for (int n = 0; n < 80; n++) begin
      p0 = i0; p1 = i1;
      checks += 2;
      if (ctrl !== table_rows[(n / 4) % 8]) begin
        failures++; $display("clock %0d pattern %b expected %b", n, ctrl, table_rows[(n / 4) % 8]);
      end
      // closed-form ring: I0 = 0,0,1,1 and I1 = 1,0,0,1 repeating
      if (i0 !== ((n % 4) >= 2) || i1 !== ((n % 4) == 0 || (n % 4) == 3)) begin
        failures++; $display("clock %0d ring %b%b", n, i0, i1);
      end
      @(posedge clk); #1;
      checks += 1;
      if (i1 !== p0 || i0 !== ~p1) begin failures++; $display("ring step at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
