// tb_energy_comparator: random and tied energies against a reference maximum
// and threshold decision, with the one-cycle result latency.
module tb_energy_comparator;
  import sl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   in_valid, out_valid, detected;
  energy_t [NUM_MICS-1:0] energies;
  energy_t                threshold, max_energy;
  logic [1:0]             max_mic;
  int checks = 0, failures = 0;
  int n_det = 0, n_quiet = 0;

  energy_comparator dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic energy_t rnd_energy();
    return {$urandom, $urandom} >> ($urandom % 40);
  endfunction

  initial begin
    energy_t emax; int imax; logic edet;
    in_valid = 0; energies = '0; threshold = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int m = 0; m < NUM_MICS; m++) energies[m] = rnd_energy();
      if (i % 10 == 0) energies[2] = energies[1];         // ties
      if (i % 7 == 0) energies[0] = energies[2];
      threshold = (i % 5 == 0) ? energies[$urandom % 3] : rnd_energy();
      in_valid = 1;
      emax = energies[0]; imax = 0;
      for (int m = 1; m < NUM_MICS; m++) if (energies[m] > emax) begin emax = energies[m]; imax = m; end
      edet = emax > threshold;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || max_energy !== emax || max_mic !== 2'(imax) || detected !== edet) begin
        failures++;
        if (failures < 10) $display("i=%0d got v=%b %0d mic%0d det=%b expected %0d mic%0d det=%b",
                                    i, out_valid, max_energy, max_mic, detected, emax, imax, edet);
      end
      if (edet) n_det++; else n_quiet++;
    end
    checks++;
    if (n_det == 0 || n_quiet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
