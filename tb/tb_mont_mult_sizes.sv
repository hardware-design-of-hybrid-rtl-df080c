// tb_mont_mult_sizes -- runs the SFG-II multiplier at the modulus lengths
// used in the area/clock comparison (128, 256, 512 and 768 bits; 1024 is
// covered by tb_mont_mult_full) and at l = 4, the size used for the
// functional simulation, including its operand set A = 11, B = 3, N = 7.
// Each size is a separate mont_mult_top driven by mm_runner; every result
// is checked exactly and every operation must take 3l + 1 clocks from the
// first input bit to the last result bit.
module tb_mont_mult_sizes;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int NR = 5;
  int   checks [NR];
  int   failures [NR];
  logic finished [NR];

  mm_runner #(.L(4),   .NOPS(20), .APPENDIX_VECTOR(1'b1)) u_l4
    (.clk(clk), .rst(rst), .checks(checks[0]), .failures(failures[0]), .finished(finished[0]));
  mm_runner #(.L(128), .NOPS(6)) u_l128
    (.clk(clk), .rst(rst), .checks(checks[1]), .failures(failures[1]), .finished(finished[1]));
  mm_runner #(.L(256), .NOPS(4)) u_l256
    (.clk(clk), .rst(rst), .checks(checks[2]), .failures(failures[2]), .finished(finished[2]));
  mm_runner #(.L(512), .NOPS(3)) u_l512
    (.clk(clk), .rst(rst), .checks(checks[3]), .failures(failures[3]), .finished(finished[3]));
  mm_runner #(.L(768), .NOPS(2)) u_l768
    (.clk(clk), .rst(rst), .checks(checks[4]), .failures(failures[4]), .finished(finished[4]));

  int total_checks, total_failures;

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int k = 0; k < NR; k++) if (!finished[k]) all_done = 1'b0;
    end while (!all_done);
    total_checks = 0;
    total_failures = 0;
    for (int k = 0; k < NR; k++) begin
      total_checks += checks[k];
      total_failures += failures[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

endmodule
