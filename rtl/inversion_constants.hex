@40
15000000000000000000000000000000000000000000000000
