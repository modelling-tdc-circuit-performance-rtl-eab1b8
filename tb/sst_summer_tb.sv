// sst_summer_tb: self-checking test of the SST front end.
//
// Drives a new SPAD vector before every rising clock edge: random sparse
// vectors, long pulses held over several cycles, and a burst in which all
// SPADs fire in the same cycle. The reference count after edge k is the
// number of inputs that are 1 in the vector sampled at edge k-1 and 0 in the
// one sampled at edge k-2 (two-edge latency, each pulse counted once).
module sst_summer_tb;
  localparam int unsigned N = 100;
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] spad = '0;
  logic [CW-1:0] count;
  logic [N-1:0] hist [3];
  int checks = 0, failures = 0, bursts = 0, long_pulses = 0;

  sst_summer #(.N_SPAD(N)) dut (.clk(clk), .rst_n(rst_n), .spad_i(spad), .count_o(count));

  always #1 clk = ~clk;

  function automatic logic [N-1:0] rand_vec(input int unsigned density);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = ($urandom_range(99) < density);
    return v;
  endfunction

  initial begin
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      @(negedge clk);
      // outputs of the edge just passed: hist[0] was sampled at it
      if (k >= 3) begin
        checks++;
        if (count != CW'($countones(hist[1] & ~hist[2]))) begin
          failures++;
          if (failures < 10) $display("cycle %0d: count %0d expected %0d", k, count,
                                      $countones(hist[1] & ~hist[2]));
        end
      end
      unique case (k % 50)
        10: begin spad = '1; bursts++; end              // every SPAD at once
        11, 12, 13: begin spad = '1; long_pulses++; end // held high: no recount
        14: spad = '0;
        default: spad = rand_vec((k % 7) * 8);
      endcase
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = spad;
    end
    checks++;
    if (bursts == 0 || long_pulses == 0) failures++;
    $display("bursts=%0d long_pulse_cycles=%0d", bursts, long_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
