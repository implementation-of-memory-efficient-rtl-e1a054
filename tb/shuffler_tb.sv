// shuffler_tb: full-size (360 lanes) shuffle network. Random message vectors
// are presented every cycle with random rotations and a random VN/CN select;
// the rotation values for stages 2 and 3 are the stage-1 value delayed. Three
// cycles later the output must be the selected vector rotated:
// out[(m + rot) mod 360] = in[m]. Rotations 0, 1, 359 and multiples of 64/8
// are included.
module shuffler_tb;
  localparam int unsigned P = 360, W = 7, SH_W = 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic first_half;
  logic [W-1:0] vn_concat [P], cn_concat [P], out [P];
  logic [SH_W-1:0] rot1, rot2, rot3;
  int checks = 0, failures = 0;

  typedef struct {
    logic [W-1:0] v [P];
    int           r;
  } exp_t;
  exp_t hist [$];

  shuffler #(.P(P), .W(W), .SH_W(SH_W)) dut (.*);

  always_ff @(posedge clk) begin
    rot2 <= rot1;
    rot3 <= rot2;
  end

  initial begin
    int special [8] = '{0, 1, 359, 64, 320, 8, 7, 200};
    exp_t e, o;
    int bad;
    rot1 = '0; first_half = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      first_half = $urandom_range(0, 1);
      for (int m = 0; m < int'(P); m++) begin
        vn_concat[m] = W'($urandom);
        cn_concat[m] = W'($urandom);
      end
      rot1 = (i < 8) ? SH_W'(special[i]) : SH_W'($urandom_range(0, P - 1));
      for (int m = 0; m < int'(P); m++) e.v[m] = first_half ? vn_concat[m] : cn_concat[m];
      e.r = int'(rot1);
      hist.push_back(e);
      if (hist.size() == 4) begin
        o = hist.pop_front();
        bad = 0;
        for (int m = 0; m < int'(P); m++)
          if (out[(m + o.r) % P] !== o.v[m]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          if (failures < 5) $display("rotation %0d: %0d lanes wrong", o.r, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
