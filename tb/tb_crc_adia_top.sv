// End-to-end test of crc_adia_top in all its configurations, side by side:
//   u4 : 4-phase power clock   (latency 75 Tr = 18.75 power-clock cycles)
//   u2 : 2-phase power clock   (latency 225 Tr = 37.5 cycles of 6 Tr)
//   u1 : single-phase + Cx/Cxb (latency 300 Tr = 75 cycles)
//   ur : 4-phase, 32-bit message made of 16 data bits and their CRC, the
//        receiver-side check (zero remainder, non-zero after a bit flip).
// Each instance has its own crc_top_driver; the result line sums them.
//
// The three power-clocking schemes and their latencies in cycles follow the
// document; the 32-bit receiver instance and the random seeds are this
// testbench's own choice.
module tb_crc_adia_top;
  import crc_adia_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   chk [4];
  int   fail[4];
  logic dn  [4];

  // 4-phase, 2-phase and single-phase, 16-bit message
  for (genvar k = 0; k < 3; k++) begin : g_scheme
    localparam pc_scheme_e S = (k == 0) ? PC_4PHASE : (k == 1) ? PC_2PHASE : PC_1PHASE;
    logic        pc_rst, res, new_message, r_count, wait_n, pc_cycle;
    logic [15:0] msg, init, m_out, crc_out;
    logic [15:1] gpoly;
    logic [3:0]  pc_ph;

    crc_adia_top #(.SCHEME(S), .CRC_W(16), .MSG_W(16)) dut (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n, .pc_ph, .pc_cycle
    );

    crc_top_driver #(.SCHEME(S), .CRC_W(16), .MSG_W(16), .RX(1'b0), .ROUNDS(10)) drv (
      .clk, .pc_rst, .res, .new_message, .msg, .gpoly, .init,
      .m_out, .crc_out, .r_count, .wait_n,
      .checks(chk[k]), .failures(fail[k]), .done(dn[k])
    );
  end

  // receiver check: 32-bit word = 16 data bits followed by their CRC
  logic        rx_pc_rst, rx_res, rx_nm, rx_r_count, rx_wait_n, rx_pc_cycle;
  logic [31:0] rx_msg, rx_m_out;
  logic [15:0] rx_init, rx_crc_out;
  logic [15:1] rx_gpoly;
  logic [3:0]  rx_pc_ph;

  crc_adia_top #(.SCHEME(PC_4PHASE), .CRC_W(16), .MSG_W(32)) dut_rx (
    .clk, .pc_rst(rx_pc_rst), .res(rx_res), .new_message(rx_nm), .msg(rx_msg),
    .gpoly(rx_gpoly), .init(rx_init), .m_out(rx_m_out), .crc_out(rx_crc_out),
    .r_count(rx_r_count), .wait_n(rx_wait_n), .pc_ph(rx_pc_ph), .pc_cycle(rx_pc_cycle)
  );

  crc_top_driver #(.SCHEME(PC_4PHASE), .CRC_W(16), .MSG_W(32), .RX(1'b1), .ROUNDS(10)) drv_rx (
    .clk, .pc_rst(rx_pc_rst), .res(rx_res), .new_message(rx_nm), .msg(rx_msg),
    .gpoly(rx_gpoly), .init(rx_init), .m_out(rx_m_out), .crc_out(rx_crc_out),
    .r_count(rx_r_count), .wait_n(rx_wait_n),
    .checks(chk[3]), .failures(fail[3]), .done(dn[3])
  );

  // the phase strobes of the 4-phase instance are one-hot on every tick
  int ph_checks = 0, ph_fail = 0;
  always @(posedge clk) begin
    if (!g_scheme[0].pc_rst) begin
      ph_checks++;
      if (!$onehot(g_scheme[0].pc_ph)) ph_fail++;
    end
  end

  initial begin
    #1 wait (dn[0] && dn[1] && dn[2] && dn[3]);
    #20;
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3] + ph_checks,
             fail[0] + fail[1] + fail[2] + fail[3] + ph_fail);
    $finish;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d",
             chk[0] + chk[1] + chk[2] + chk[3], fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end

endmodule
