// bufg_bist: circular-comparison BIST of the global clock buffers.
//
// N_BUF BUFGCTRL buffers (the BUTs) are driven by two TPGs: TPG 0 feeds the
// odd-numbered buffers, TPG 1 the even ones. Each TPG drives I0/I1 from its twisted
// ring counter and the six control inputs from its FSM. Buffer n is compared with
// buffer n+1 (the last with buffer 0) by one ORA of a single output pair, so every
// buffer output is watched by two ORAs and a failing buffer is located by the two
// ORAs that flag. In the FPGA each buffer output reaches its two ORAs through one
// LUT used as a buffer; here that is plain fan-out. The ORAs are always enabled, so
// the first clock edge after configuration already compares the outputs set up by
// PRESELECT_I0/PRESELECT_I1/INIT_OUT. The ORAs form one iterative-OR chain; pass is
// its inverted end.
//
// cfg[n] is the configuration memory of buffer n (normally all BUFG_CFG1 or all
// BUFG_CFG2). One pass through the eight control patterns takes 32 clocks.
module bufg_bist
  import bist_pkg::*;
#(
  parameter int unsigned N_BUF = 32
) (
  input  logic             clk,
  input  logic             gsr,
  input  bufg_cfg_t        cfg [N_BUF],
  output logic             pass,
  output logic [N_BUF-1:0] ora_flags,   // for readback diagnosis, 1 = pass
  output logic [N_BUF-1:0] bufg_o,      // buffer outputs (observation only)
  output logic [2:0]       pattern      // FSM state of TPG 0
);
  logic       t_i0   [2];
  logic       t_i1   [2];
  bufg_ctrl_t t_ctrl [2];
  logic [2:0] t_state[2];
  logic [N_BUF:0] chain;

  for (genvar t = 0; t < 2; t++) begin : g_tpg
    bufg_tpg u_tpg (
      .clk  (clk),
      .gsr  (gsr),
      .i0   (t_i0[t]),
      .i1   (t_i1[t]),
      .ctrl (t_ctrl[t]),
      .state(t_state[t])
    );
  end

  for (genvar n = 0; n < N_BUF; n++) begin : g_but
    localparam int unsigned T = (n % 2 == 1) ? 0 : 1;
    bufgctrl u_buf (
      .cfg    (cfg[n]),
      .gsr    (gsr),
      .i0     (t_i0[T]),
      .i1     (t_i1[T]),
      .s0     (t_ctrl[T].s0),
      .ce0    (t_ctrl[T].ce0),
      .ignore0(t_ctrl[T].ig0),
      .s1     (t_ctrl[T].s1),
      .ce1    (t_ctrl[T].ce1),
      .ignore1(t_ctrl[T].ig1),
      .o      (bufg_o[n])
    );
  end

  assign chain[0] = 1'b0;

  for (genvar n = 0; n < N_BUF; n++) begin : g_ora
    ora_cell #(.NPAIR(1)) u_ora (
      .clk      (clk),
      .gsr      (gsr),
      .ce       (1'b1),
      .a        (bufg_o[n]),
      .b        (bufg_o[(n + 1) % N_BUF]),
      .carry_in (chain[n]),
      .flag     (ora_flags[n]),
      .carry_out(chain[n + 1])
    );
  end

  assign pass    = ~chain[N_BUF];
  assign pattern = t_state[0];
endmodule
