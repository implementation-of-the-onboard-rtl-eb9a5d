// Exhaustive testbench for spi_bus_mux: for every owner and every value of
// the three controllers' {sck, mosi, sel} drives, checks that SCK and MOSI
// come from the owner alone (low with no owner), that only the owner's
// select can be active (AMP_CS and DAC_CS active low, AD_CONV active high),
// and that both flash disables stay high.
module tb_spi_bus_mux;
  import adc_dac_pkg::*;

  bus_owner_t owner;
  spi_drv_t   amp, adc, dac;
  logic       sck, mosi, amp_cs_n, ad_conv, dac_cs_n, sf_ce0, fpga_init_b;
  int         checks = 0, failures = 0;

  spi_bus_mux dut (
    .owner(owner), .amp(amp), .adc(adc), .dac(dac), .spi_sck(sck), .spi_mosi(mosi),
    .amp_cs_n(amp_cs_n), .ad_conv(ad_conv), .dac_cs_n(dac_cs_n),
    .sf_ce0(sf_ce0), .fpga_init_b(fpga_init_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e_drv;
    for (int o = 0; o < 4; o++) begin
      for (int v = 0; v < 512; v++) begin
        owner = bus_owner_t'(o);
        amp   = spi_drv_t'(v[2:0]);
        adc   = spi_drv_t'(v[5:3]);
        dac   = spi_drv_t'(v[8:6]);
        #1;
        case (o)
          1:       e_drv = v[2:0];
          2:       e_drv = v[5:3];
          3:       e_drv = v[8:6];
          default: e_drv = 3'b000;
        endcase
        check(sck == e_drv[2] && mosi == e_drv[1], $sformatf("owner %0d drive %h", o, v));
        check(amp_cs_n == !(o == 1 && v[0]), "AMP_CS");
        check(ad_conv == (o == 2 && v[3]), "AD_CONV");
        check(dac_cs_n == !(o == 3 && v[6]), "DAC_CS");
        check(sf_ce0 && fpga_init_b, "flash devices disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
