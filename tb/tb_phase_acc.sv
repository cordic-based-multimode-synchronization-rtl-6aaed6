// tb_phase_acc: self-checking test of the phase accumulator.
// Random load/add/step/clear operations are applied and compared every
// cycle with a model kept in the testbench (24-bit wrap-around).
module tb_phase_acc;
  localparam int PW = 24;
  logic clk = 0, rst_n = 0, clear = 0, load_inc = 0, add_inc = 0, step = 0;
  logic signed [PW-1:0] load_val = '0, add_val = '0, inc, phase;
  logic signed [PW-1:0] m_inc, m_phase;
  int checks = 0, failures = 0;

  phase_acc #(.PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_inc = '0; m_phase = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 99) == 0);
      load_inc = ($urandom_range(0, 19) == 0);
      add_inc  = ($urandom_range(0, 9) == 0);
      step     = $urandom_range(0, 1);
      load_val = PW'($urandom);
      add_val  = PW'($urandom);
      @(posedge clk);
      if (clear) begin
        m_inc = '0; m_phase = '0;
      end else begin
        if (step) m_phase = m_phase + m_inc;
        if (load_inc) m_inc = load_val;
        else if (add_inc) m_inc = m_inc + add_val;
      end
      #1;
      checks++;
      if (inc !== m_inc || phase !== m_phase) begin
        failures++;
        $display("phase_acc mismatch inc %0d/%0d phase %0d/%0d", inc, m_inc, phase, m_phase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
