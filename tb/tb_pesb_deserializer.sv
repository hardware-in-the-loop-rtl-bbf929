// tb_pesb_deserializer: writes frames of results in order (with idle gaps) and checks
// that every vector entry holds the value of its channel and that frame_done pulses once,
// one clock after the last entry.
module tb_pesb_deserializer;
  import hil_pkg::*;
  localparam int NCH = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, frame_done;
  logic [4:0] in_ch = 0;
  fix_t in_u = 0, in_soc = 0, u_vec [NCH], soc_vec [NCH];
  int checks = 0, failures = 0, n_done = 0;

  pesb_deserializer #(.NCH(NCH)) dut (.clk, .rst_n, .in_valid, .in_ch, .in_u, .in_soc,
    .u_vec, .soc_vec, .frame_done);

  logic [4:0] acc_ch = '0;
  always @(posedge clk) if (in_valid) acc_ch <= in_ch;
  // frame_done must follow the write of the last channel, not any other
  always @(negedge clk) if (frame_done) begin
    n_done++;
    checks++;
    if (int'(acc_ch) != NCH - 1) begin failures++; $display("frame_done after channel %0d", acc_ch); end
  end

  initial begin
    fix_t eu [NCH], es [NCH];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 10; f++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        checks++;
        if (frame_done) begin failures++; $display("early frame_done"); end
        eu[c] = fix_t'($urandom); es[c] = fix_t'($urandom);
        in_valid = 1; in_ch = 5'(c); in_u = eu[c]; in_soc = es[c];
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      if (n_done != f + 1) begin
        @(negedge clk);
      end
      checks++;
      if (n_done != f + 1) begin failures++; $display("frame_done count %0d", n_done); end
      for (int c = 0; c < NCH; c++) begin
        checks += 2;
        if (u_vec[c] != eu[c]) begin failures++; $display("u_vec[%0d]", c); end
        if (soc_vec[c] != es[c]) begin failures++; $display("soc_vec[%0d]", c); end
      end
    end
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
