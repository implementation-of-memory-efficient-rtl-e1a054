// ldpc_decoder_full_tb: one complete operation of the full-size decoder (360
// lanes, default parameters): a normal frame of rate 1/4 (n = 64800) and then
// a short frame of rate 1/5 (n = 16200) are loaded through the register chain,
// decoded with 30 iterations each, and unloaded; every posterior LLR and the
// cycle counts are checked against the reference model.
module ldpc_decoder_full_tb;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, llr_access, llr_shift, llr_din_we, start, busy, done;
  logic [5:0] llr_din, llr_dout;
  logic [7:0] llr_addr;
  logic [MODE_W-1:0] mode;
  logic [ITER_W-1:0] num_iter;

  ldpc_decoder dut (.*);

  ldpc_tb_core #(.P(360), .NFRAMES(2), .MODES({8'd11, 8'd0}), .ITERS({8'd30, 8'd30})) core (
    .clk, .rst_n, .llr_access, .llr_shift, .llr_din, .llr_din_we, .llr_addr, .llr_dout,
    .start, .mode, .num_iter, .busy, .done,
    .dir_fwd(dut.u_ctrl.first_half),
    .wrap_slot(dut.u_ctrl.ctl[4].valid && dut.u_ctrl.ctl[4].ph && dut.u_ctrl.ctl[4].e.wrap));

  initial begin
    repeat (600000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", core.checks + 1, core.failures + 1);
    $finish;
  end
endmodule
