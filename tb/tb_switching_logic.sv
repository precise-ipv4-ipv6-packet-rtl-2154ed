// Testbench of switching_logic: for every mode, drives distinct beats and
// random valid/ready values on all interfaces and checks each output against
// the routing table of the mode.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_switching_logic;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  pg_mode_e mode;
  fl_beat_t dma_tx, dma_rx, net_rx, lim, mem_wr, mem_rd;
  logic dma_tx_valid, dma_tx_ready, dma_rx_valid, dma_rx_ready, net_rx_valid, net_rx_ready;
  logic lim_valid, lim_ready, mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready;
  switching_logic dut (.*);
  initial begin
    #100000; failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      mode = pg_mode_e'(n % 5);
      dma_tx = '{data: {32'h0D0A, $urandom}, rem: 3'd1, sof: 1'b1, eof: 1'b0};
      net_rx = '{data: {32'h0E0E, $urandom}, rem: 3'd2, sof: 1'b0, eof: 1'b1};
      mem_rd = '{data: {32'h0303, $urandom}, rem: 3'd3, sof: 1'b1, eof: 1'b1};
      {dma_tx_valid, dma_rx_ready, net_rx_valid, lim_ready, mem_wr_ready, mem_rd_valid} = 6'($urandom);
      #1;
      case (mode)
        MODE_NIC: begin
          `CHECK(lim_valid == dma_tx_valid && lim == dma_tx && dma_tx_ready == lim_ready, "NIC tx")
          `CHECK(dma_rx_valid == net_rx_valid && dma_rx == net_rx && net_rx_ready == dma_rx_ready, "NIC rx")
          `CHECK(!mem_wr_valid && !mem_rd_ready, "NIC memory idle")
        end
        MODE_GEN: begin
          `CHECK(!lim_valid && !dma_tx_ready && !mem_wr_valid && !mem_rd_ready, "GEN idle paths")
          `CHECK(dma_rx_valid == net_rx_valid && dma_rx == net_rx && net_rx_ready == dma_rx_ready, "GEN rx")
        end
        MODE_LOAD_HOST: begin
          `CHECK(mem_wr_valid == dma_tx_valid && mem_wr == dma_tx && dma_tx_ready == mem_wr_ready, "host load")
          `CHECK(!lim_valid && !mem_rd_ready, "host load: limiter idle")
          `CHECK(dma_rx_valid == net_rx_valid && net_rx_ready == dma_rx_ready, "host load rx")
        end
        MODE_LOAD_NET: begin
          `CHECK(mem_wr_valid == net_rx_valid && mem_wr == net_rx && net_rx_ready == mem_wr_ready, "net load")
          `CHECK(!dma_rx_valid && !dma_tx_ready && !lim_valid, "net load: others idle")
        end
        default: begin
          `CHECK(lim_valid == mem_rd_valid && lim == mem_rd && mem_rd_ready == lim_ready, "replay")
          `CHECK(!dma_tx_ready && !mem_wr_valid, "replay: host tx held")
          `CHECK(dma_rx_valid == net_rx_valid && net_rx_ready == dma_rx_ready, "replay rx")
        end
      endcase
    end
    `TB_FINISH
  end
endmodule
