// tb_hough_transform: checks the per-column phi58 update and the column
// range test of one Bin (BIN = 5) on random stubs, one per clock, with the
// result expected exactly one clock after the input.
module tb_hough_transform;
  import ht_pkg::*;
  localparam int BIN = 5;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  chain_stub_t s_in, s_out, prev;
  logic active, prev_ok;
  int checks = 0, failures = 0, n_act = 0, n_inact = 0;

  hough_transform #(.BIN(BIN)) dut (.clk, .rst, .s_in, .s_out, .active);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [PHI_W-1:0] exp_phi;
    s_in = '0; prev_ok = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (prev_ok) begin
        exp_phi = PHI_W'(int'(prev.phi) + int'(prev.r58));
        checks++;
        if (s_out.phi !== exp_phi || s_out.ptr !== prev.ptr || s_out.layer !== prev.layer ||
            s_out.valid !== prev.valid || s_out.start !== prev.start ||
            s_out.start_par !== prev.start_par || s_out.r58 !== prev.r58) begin
          failures++;
          $display("FAIL phi %0d exp %0d", s_out.phi, exp_phi);
        end
        checks++;
        if (active !== (prev.valid && int'(prev.qmin) <= BIN && BIN <= int'(prev.qmax))) begin
          failures++;
          $display("FAIL active qmin %0d qmax %0d", prev.qmin, prev.qmax);
        end
        if (active) n_act++; else n_inact++;
      end
      s_in.valid     = $urandom_range(0, 3) != 0;
      s_in.ptr       = PTR_W'($urandom);
      s_in.r58       = R58_W'(int'($urandom_range(0, 200)) - 100);
      s_in.phi       = PHI_W'(int'($urandom_range(0, 4000)) - 1000);
      s_in.layer     = LAYER_W'($urandom);
      s_in.qmin      = COL_W'($urandom_range(0, 10));
      s_in.qmax      = COL_W'($urandom_range(0, 12));
      s_in.start     = $urandom_range(0, 9) == 0;
      s_in.start_par = 1'($urandom);
      prev = s_in;
      prev_ok = 1'b1;
    end
    checks++;
    if (n_act == 0 || n_inact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
