// tb_sdl_mem_adapter - self-checking test of the external-memory access
// path: the adapter with its word-width shifter in front of the RAM.
// Four width pairs run side by side (datapath/memory = 8/16, 8/32, 16/8,
// 8/8). Each writes random data to random datapath addresses, keeps a
// reference model, then reads back every address written and checks the
// RAM contents directly: lanes of a wide memory word and parts of a wide
// datapath word must sit in the documented order. Latencies from request
// to done are checked (wide or equal memory: read 3, write 4; narrow
// memory with K parts: read 2K+1, write K+1).
module tb_sdl_mem_adapter;

  localparam int NCFG = 4;
  localparam int CFG_DW [NCFG] = '{8, 8, 16, 8};
  localparam int CFG_MW [NCFG] = '{16, 32, 8, 8};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit finished [NCFG];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int DW  = CFG_DW[c];
    localparam int MW  = CFG_MW[c];
    localparam int MAW = 5;
    localparam bit NARROW = MW < DW;
    localparam int R   = NARROW ? 1 : MW / DW;
    localparam int K   = NARROW ? DW / MW : 1;
    localparam int AW  = MAW + ((R > 1) ? $clog2(R) : 0) - ((K > 1) ? $clog2(K) : 0);
    localparam int RD_LAT = NARROW ? 2*K + 1 : 3;
    localparam int WR_LAT = NARROW ? K + 1 : 4;

    logic req = 0, we = 0, ready, done;
    logic [AW-1:0] addr = '0;
    logic [DW-1:0] wdata = '0, rdata;
    logic mem_en, mem_we;
    logic [MAW-1:0] mem_addr;
    logic [MW-1:0] mem_wdata, mem_rdata;
    logic [DW-1:0] model [2**AW];
    bit            valid [2**AW];

    sdl_mem_adapter #(.DW(DW), .MW(MW), .MEM_AW(MAW)) dut (
      .clk, .rst_n, .req, .we, .addr, .wdata, .ready, .done, .rdata,
      .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
    sdl_ext_ram #(.MW(MW), .AW(MAW)) ram (
      .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

    task automatic access(logic w, logic [AW-1:0] a, logic [DW-1:0] d, output logic [DW-1:0] q);
      int n;
      while (!ready) @(posedge clk);
      #1 req = 1; we = w; addr = a; wdata = d;
      @(posedge clk); #1 req = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      q = rdata;
      checks++;
      if (n != (w ? WR_LAT : RD_LAT)) begin
        failures++;
        $display("FAIL cfg %0d/%0d latency %0d for %s", DW, MW, n, w ? "write" : "read");
      end
    endtask

    initial begin
      logic [DW-1:0] q;
      for (int i = 0; i < 2**AW; i++) valid[i] = 0;
      wait (rst_n);
      for (int i = 0; i < 80; i++) begin
        logic [AW-1:0] a;
        logic [DW-1:0] d;
        a = AW'($urandom);
        d = DW'($urandom);
        access(1, a, d, q);
        model[a] = d; valid[a] = 1;
      end
      for (int i = 0; i < 2**AW; i++) if (valid[i]) begin
        access(0, AW'(i), '0, q);
        checks++;
        if (q !== model[i]) begin
          failures++;
          $display("FAIL cfg %0d/%0d addr %0d read %h expected %h", DW, MW, i, q, model[i]);
        end
      end
      // placement in memory
      if (NARROW) begin
        // datapath word a = memory words a*K .. a*K+K-1, low part first
        for (int a = 0; a < 2**AW; a++) if (valid[a]) begin
          logic [DW-1:0] img;
          for (int p = 0; p < K; p++) img[p*MW +: MW] = ram.mem[a*K + p][MW-1:0];
          checks++;
          if (img !== model[a]) begin
            failures++; $display("FAIL cfg %0d/%0d word %0d parts %h", DW, MW, a, img);
          end
        end
      end else begin
        // lane l of memory word k = datapath address k*R + l
        for (int k = 0; k < 2**MAW; k++) begin
          for (int l = 0; l < R; l++) if (valid[k*R + l]) begin
            checks++;
            if (ram.mem[k][l*DW +: DW] !== model[k*R + l]) begin
              failures++;
              $display("FAIL cfg %0d/%0d memory word %0d lane %0d = %h", DW, MW, k, l, ram.mem[k]);
            end
          end
        end
      end
      finished[c] = 1;
    end
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
