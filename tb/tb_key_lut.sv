// tb_key_lut: random test of the key look-up table against an array model.
//
// Every clock up to NW ports write random entries (several ports often hit
// the same entry: the highest port must win) and NR ports read random
// entries; reads must show the contents from before the clock edge, and
// the table must read zero after reset.
module tb_key_lut;

  localparam int DEPTH = 16;
  localparam int WIDTH = 24;
  localparam int NW    = 5;
  localparam int NR    = 2;
  localparam int AW    = $clog2(DEPTH);

  logic                     clk;
  logic                     rst_n;
  logic [NW-1:0]            we;
  logic [NW-1:0][AW-1:0]    waddr;
  logic [NW-1:0][WIDTH-1:0] wdata;
  logic [NR-1:0][AW-1:0]    raddr;
  logic [NR-1:0][WIDTH-1:0] rdata;

  key_lut #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NW(NW), .NR(NR)) dut (
    .clk, .rst_n, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .raddr_i(raddr), .rdata_o(rdata)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0, failures = 0, collisions = 0;
  logic [WIDTH-1:0] model [DEPTH];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    we    = '0;
    waddr = '0;
    wdata = '0;
    raddr = '0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      for (int w = 0; w < NW; w++) begin
        we[w]    = ($urandom_range(0, 2) != 0);
        waddr[w] = AW'($urandom_range(0, (c < 1000) ? 3 : DEPTH - 1));
        wdata[w] = WIDTH'($urandom);
      end
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom_range(0, DEPTH - 1));
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++;
          $display("%0t read %0d of entry %0d: %h, expected %h", $time, r, raddr[r], rdata[r],
                   model[raddr[r]]);
        end
      end
      for (int w = 0; w < NW; w++)
        for (int v = w + 1; v < NW; v++)
          if (we[w] && we[v] && waddr[w] == waddr[v]) collisions++;
      for (int w = 0; w < NW; w++) if (we[w]) model[waddr[w]] = wdata[w];
      @(negedge clk);
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("no write collision exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
