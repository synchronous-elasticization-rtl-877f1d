// tb_elastic_buffer: self-checking test of the elastic buffer.
// Three buffers, reset Empty, Half (one token 0xA5) and Full (two tokens 0xA5),
// are driven with random valid/stall traffic that obeys the SELF rule (a
// producer in Retry keeps its token). A queue model per buffer checks that
// tokens leave in order and unchanged, that vr/sl encode Empty/Half/Full, that
// a token entering an empty buffer is offered in the next cycle, and that a
// Half buffer with a free consumer passes one token per cycle. A token put
// into an empty buffer must show as valid at the next edge (state check).
module tb_elastic_buffer;
  import elastic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   cycle = 0;
  bit   phase_stream = 1'b0;

  always #5 clk = ~clk;

  localparam eb_state_e INITS [3] = '{EB_EMPTY, EB_HALF, EB_FULL};

  for (genvar g = 0; g < 3; g++) begin : g_dut
    logic       vl, sl, vr, sr;
    logic [7:0] dl, dr, d_last;
    logic [7:0] q [$];
    logic [7:0] last_in;
    int         streamed;

    elastic_buffer #(.WIDTH(8), .INIT(INITS[g]), .INIT_DATA(8'hA5)) dut (
      .clk, .rst_n, .vl, .sl, .dl, .vr, .sr, .dr, .d_last
    );

    initial begin
      vl = 1'b0; sr = 1'b0; dl = 8'h00; streamed = 0;
      q = {};
      for (int t = 0; t < int'(INITS[g]); t++) q.push_back(8'hA5);
      last_in = 8'hA5;
    end

    // checks and model update at the clock edge
    always @(posedge clk) if (rst_n) begin
      checks++;
      if (vr != (q.size() > 0) || sl != (q.size() == 2)) begin
        failures++;
        $display("EB%0d: state mismatch vr=%0b sl=%0b model=%0d", g, vr, sl, q.size());
      end
      checks++;
      if (d_last != last_in) begin
        failures++;
        $display("EB%0d: d_last %h expected %h", g, d_last, last_in);
      end
      if (vr && !sr) begin
        checks++;
        if (q.size() == 0 || dr != q[0]) begin
          failures++;
          $display("EB%0d: data out %h expected %h", g, dr, (q.size() > 0) ? q[0] : 8'hxx);
        end
        if (q.size() > 0) void'(q.pop_front());
        if (phase_stream) streamed++;
      end
      if (vl && !sl) begin
        q.push_back(dl);
        last_in = dl;
      end
    end

    // stimulus after the edge
    always @(negedge clk) if (rst_n) begin
      if (phase_stream) begin
        vl <= 1'b1;
        dl <= 8'($urandom);
        sr <= 1'b0;
      end else begin
        if (!(vl && sl)) begin
          vl <= ($urandom % 3) != 0;
          dl <= 8'($urandom);
        end
        sr <= ($urandom % 3) == 0;
      end
    end
  end

  // latency: a token put into an empty buffer is offered on the next edge
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2000) @(posedge clk);
    // streaming phase: free consumer, producer always valid -> one token per cycle
    phase_stream = 1'b1;
    repeat (20) @(posedge clk);
    g_dut[0].streamed = 0;
    g_dut[1].streamed = 0;
    g_dut[2].streamed = 0;
    repeat (100) @(posedge clk);
    for (int g = 0; g < 3; g++) begin
      int s;
      s = (g == 0) ? g_dut[0].streamed : (g == 1) ? g_dut[1].streamed : g_dut[2].streamed;
      checks++;
      if (s != 100) begin
        failures++;
        $display("EB%0d: throughput %0d tokens in 100 cycles", g, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
