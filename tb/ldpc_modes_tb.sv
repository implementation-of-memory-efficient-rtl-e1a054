// ldpc_modes_tb: all 21 frame modes (11 normal, 10 short code rates) decoded
// back to back by an 8-lane decoder, 5 iterations each. Every posterior LLR
// and every decode's cycle count are checked against the reference model, and
// the frames are loaded and unloaded through the register chain.
module ldpc_modes_tb;
  import ldpc_pkg::*;
  localparam int unsigned P = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, llr_access, llr_shift, llr_din_we, start, busy, done;
  logic [5:0] llr_din, llr_dout;
  logic [7:0] llr_addr;
  logic [MODE_W-1:0] mode;
  logic [ITER_W-1:0] num_iter;

  // byte f of MODES is the mode of frame f: 0, 1, ..., 20
  localparam logic [255:0] MODES = {8'd20, 8'd19, 8'd18, 8'd17, 8'd16, 8'd15, 8'd14,
                                    8'd13, 8'd12, 8'd11, 8'd10, 8'd9, 8'd8, 8'd7,
                                    8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd1, 8'd0};
  localparam logic [255:0] ITERS = {21{8'd5}};

  ldpc_decoder #(.P(P)) dut (.*);

  ldpc_tb_core #(.P(P), .NFRAMES(21), .MODES(MODES), .ITERS(ITERS), .ERR_PERMILLE(10)) core (
    .clk, .rst_n, .llr_access, .llr_shift, .llr_din, .llr_din_we, .llr_addr, .llr_dout,
    .start, .mode, .num_iter, .busy, .done,
    .dir_fwd(dut.u_ctrl.first_half),
    .wrap_slot(dut.u_ctrl.ctl[4].valid && dut.u_ctrl.ctl[4].ph && dut.u_ctrl.ctl[4].e.wrap));

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", core.checks + 1, core.failures + 1);
    $finish;
  end
endmodule
