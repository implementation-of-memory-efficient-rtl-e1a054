// ldpc_decoder_tb: end-to-end test of the decoder with 8 lanes instead of 360.
// Frames of three modes (1/5 short, 1/4 normal, 8/9 short) are loaded,
// decoded and unloaded through the register chain; every posterior LLR and
// the cycle count of each decode are checked against a reference model.
module ldpc_decoder_tb;
  import ldpc_pkg::*;
  localparam int unsigned P = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, llr_access, llr_shift, llr_din_we, start, busy, done;
  logic [5:0] llr_din, llr_dout;
  logic [7:0] llr_addr;
  logic [MODE_W-1:0] mode;
  logic [ITER_W-1:0] num_iter;

  ldpc_decoder #(.P(P)) dut (.*);

  ldpc_tb_core #(.P(P), .NFRAMES(4), .MODES({8'd10, 8'd20, 8'd0, 8'd11}), .ITERS({8'd3, 8'd5, 8'd8, 8'd6})) core (
    .clk, .rst_n, .llr_access, .llr_shift, .llr_din, .llr_din_we, .llr_addr, .llr_dout,
    .start, .mode, .num_iter, .busy, .done,
    .dir_fwd(dut.u_ctrl.first_half),
    .wrap_slot(dut.u_ctrl.ctl[4].valid && dut.u_ctrl.ctl[4].ph && dut.u_ctrl.ctl[4].e.wrap));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", core.checks + 1, core.failures + 1);
    $finish;
  end
endmodule
