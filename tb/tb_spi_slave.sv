// tb_spi_slave: an SPI master (mode 0, MSB first, 20 MHz) runs transfers
// of L bits. The bits read on sdo must be rd_data MSB first, and after the
// transfer shreg must hold the bits sent on sdi. A short transfer followed
// by a full one checks that each transfer restarts from rd_data.
module tb_spi_slave;
  localparam int L = 544;
  logic sclk = 0, cs_n = 1, sdi = 0, sdo;
  logic [L-1:0] rd_data, shreg;
  int checks = 0, failures = 0;

  spi_slave #(.L(L)) dut (.sclk, .cs_n, .sdi, .sdo, .rd_data, .shreg);

  task automatic transfer(input logic [L-1:0] tx, input int nbits, output logic [L-1:0] rx);
    rx = '0;
    cs_n = 0;
    #25ns;
    for (int i = 0; i < nbits; i++) begin
      sdi = tx[L-1-i];
      #25ns;
      rx[L-1-i] = sdo;   // sampled just before the rising edge
      sclk = 1;
      #25ns;
      sclk = 0;
    end
    #25ns;
    cs_n = 1;
    #50ns;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] tx, rx;
    #100ns;
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < L; i += 32) begin
        rd_data[i +: 32] = $urandom;
        tx[i +: 32] = $urandom;
      end
      if (n == 3) begin
        transfer(tx, 17, rx);   // aborted transfer
        checks++;
        if (rx[L-1 -: 17] != rd_data[L-1 -: 17]) begin failures++; $display("FAIL short read"); end
      end
      transfer(tx, L, rx);
      checks++;
      if (rx != rd_data) begin failures++; $display("FAIL transfer %0d read back", n); end
      checks++;
      if (shreg != tx) begin failures++; $display("FAIL transfer %0d written", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
