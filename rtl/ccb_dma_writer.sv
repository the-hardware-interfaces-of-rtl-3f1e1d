// ccb_dma_writer -- copies one integration's results into host DMA memory.
//
// On `start` it writes a block of 74 32-bit little-endian words at byte
// offsets 0..0x124 of the DMA area, one word per accepted transfer:
//   words  0..63  integrated values, value index = word index
//   words 64..65  overflow mask: the 8 mask bytes hold bit 0 in the least
//                 significant bit of the highest byte and bit 63 in the most
//                 significant bit of the lowest byte, i.e. the 64-bit mask
//                 is stored most significant byte first
//   words 66..73  last A/D samples, two 16-bit values per word, the even
//                 converter index in the low half
// Then it pulses `done`; the interrupt unit raises the integration interrupt
// from it, so the data is in memory before the driver is told.
// The byte order of the mask and the data words follows the CCB data
// format; the order of the three areas within the block is this design's.
//
// Port: a write-request stream for the PCI bus-master core, which adds the
// DMA base address: dma_valid/dma_addr/dma_data are held until dma_ready.
// A `start` while busy is ignored (the caller reports the overrun).
module ccb_dma_writer
  import ccb_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [NUM_VALUES-1:0][ACC_W-1:0] result,
  input  logic [NUM_VALUES-1:0]            result_ovf,
  input  logic [NUM_ADC-1:0][ADC_W-1:0]    result_diag,
  output logic                             busy,
  output logic                             done,
  output logic                             dma_valid,
  output logic [DMA_ADDR_W-1:0]            dma_addr,
  output logic [31:0]                      dma_data,
  input  logic                             dma_ready
);

  logic [6:0] word;   // 0..73
  logic [63:0] mask_be;  // mask in memory byte order, byte 0 = lowest address

  always_comb
    for (int b = 0; b < 8; b++) mask_be[8*b +: 8] = result_ovf[8*(7-b) +: 8];

  logic [2:0] k;  // diagnostic word index
  assign k = 3'(word - 7'(DMA_WORD_DIAG));

  always_comb begin
    if (word < 7'(DMA_WORD_OVF))        dma_data = result[word[5:0]];
    else if (word < 7'(DMA_WORD_DIAG))  dma_data = mask_be[32*(word - 7'(DMA_WORD_OVF)) +: 32];
    else                                dma_data = {result_diag[{k, 1'b1}], result_diag[{k, 1'b0}]};
  end

  assign dma_valid = busy;
  assign dma_addr  = {word, 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      word <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          word <= '0;
        end
      end else if (dma_ready) begin
        if (word == 7'(DMA_WORDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          word <= word + 7'd1;
        end
      end
    end
  end

endmodule
