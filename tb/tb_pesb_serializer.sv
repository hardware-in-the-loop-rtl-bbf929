// tb_pesb_serializer: captures random vectors with start, consumes the stream with a
// random ready pattern and checks order, values, that a vector change after start does
// not leak into the frame, and that a start during a frame is counted as overrun.
module tb_pesb_serializer;
  import hil_pkg::*;
  localparam int NCH = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, out_valid, out_ready = 0, busy;
  logic [4:0] out_ch;
  fix_t i_vec [NCH], t_vec [NCH], out_i, out_t;
  logic [15:0] overrun;
  int checks = 0, failures = 0;

  pesb_serializer #(.NCH(NCH)) dut (.clk, .rst_n, .start, .i_vec, .t_vec, .out_valid,
    .out_ready, .out_ch, .out_i, .out_t, .busy, .overrun);

  initial begin
    fix_t ei [NCH], et [NCH];
    for (int c = 0; c < NCH; c++) begin i_vec[c] = 0; t_vec[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      int got;
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        i_vec[c] = fix_t'($urandom); t_vec[c] = fix_t'($urandom); ei[c] = i_vec[c]; et[c] = t_vec[c];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 0; c < NCH; c++) begin i_vec[c] = fix_t'($urandom); t_vec[c] = 0; end
      got = 0;
      while (got < NCH) begin
        out_ready = ($urandom_range(0, 2) != 0);
        if (f == 5 && got == 7) begin
          start = 1;             // early start: must be refused and counted
        end
        checks++;
        if (!out_valid) begin failures++; $display("valid low mid-frame"); end
        if (out_valid && out_ready) begin
          checks += 3;
          if (int'(out_ch) != got) begin failures++; $display("order %0d exp %0d", out_ch, got); end
          if (out_i != ei[got]) begin failures++; $display("i value ch %0d", got); end
          if (out_t != et[got]) begin failures++; $display("t value ch %0d", got); end
          got++;
        end
        @(negedge clk);
        start = 0;
      end
      out_ready = 0;
      checks++;
      if (out_valid || busy) begin failures++; $display("busy after frame"); end
    end
    checks++;
    if (overrun != 16'd1) begin failures++; $display("overrun %0d", overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
